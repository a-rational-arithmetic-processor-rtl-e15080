// tb_numerator_unit -- drives the numerator hardware with random signed
// operands for all five operations and compares its result with integer
// arithmetic: J*M + K*L, J*M - K*L, J*K, J*M (signs applied). It also checks
// that the result arrives N + 1 cycles after start is applied (the load cycle plus N steps), and covers
// the extreme operands (all ones, zero).
module tb_numerator_unit;
  import rat_pkg::*;
  localparam int unsigned N = 11;

  logic                  clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  rat_op_e               op = OP_ADD;
  logic                  j_sign = 1'b0, k_sign = 1'b0;
  logic [N-1:0]          j = '0, l = '0, k = '0, m = '0;
  logic                  busy, done;
  logic signed [2*N+1:0] num;
  int checks = 0, failures = 0;

  numerator_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sgn(logic s, longint v);
    return s ? -v : v;
  endfunction

  task automatic run(rat_op_e o, logic js, logic [N-1:0] jj, logic [N-1:0] ll,
                     logic ks, logic [N-1:0] kk, logic [N-1:0] mm);
    longint expv;
    int     cyc;
    unique case (o)
      OP_ADD: expv = sgn(js, longint'(jj) * mm) + sgn(ks, longint'(kk) * ll);
      OP_SUB: expv = sgn(js, longint'(jj) * mm) - sgn(ks, longint'(kk) * ll);
      OP_MUL: expv = sgn(js ^ ks, longint'(jj) * kk);
      OP_DIV: expv = sgn(js ^ ks, longint'(jj) * mm);
      default: expv = sgn(js, longint'(jj) * mm);
    endcase
    @(negedge clk);
    op = o; j_sign = js; j = jj; l = ll; k_sign = ks; k = kk; m = mm;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    op = rat_op_e'(3'($urandom_range(0, 4)));   // inputs may change after start
    j = N'($urandom); k = N'($urandom); m = N'($urandom); l = N'($urandom);
    cyc = 1;
    while (!done && cyc < 4 * N) begin
      checks++;
      if (!busy) begin
        failures++;
        $display("FAIL busy low before done");
      end
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != N + 1) begin
      failures++;
      $display("FAIL latency %0d expected %0d", cyc, N + 1);
    end
    checks++;
    if (longint'(num) != expv) begin
      failures++;
      $display("FAIL op=%s %0d %0d/%0d %0d %0d/%0d: num=%0d expected %0d",
               o.name(), js, jj, ll, ks, kk, mm, num, expv);
    end
  endtask

  initial begin
    logic [N-1:0] ones;
    ones = '1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int o = 0; o < 5; o++) begin
      run(rat_op_e'(o), 1'b0, ones, ones, 1'b0, ones, ones);
      run(rat_op_e'(o), 1'b1, ones, ones, 1'b1, ones, ones);
      run(rat_op_e'(o), 1'b0, ones, ones, 1'b1, ones, ones);
      run(rat_op_e'(o), 1'b1, '0, ones, 1'b0, ones, 1);
    end
    run(OP_MUL, 1'b0, 3, 2, 1'b0, 4, 9);   // 3/2 * 4/9 = 12/18
    for (int i = 0; i < 2000; i++)
      run(rat_op_e'(3'($urandom_range(0, 4))), 1'($urandom), N'($urandom), N'($urandom),
          1'($urandom), N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
