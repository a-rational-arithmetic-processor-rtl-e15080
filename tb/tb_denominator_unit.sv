// tb_denominator_unit -- checks the denominator multiplier: L*M for add,
// subtract and multiply, L*K for divide and compare, against integer
// products, and that the product is ready N + 1 cycles after start (load plus N steps).
module tb_denominator_unit;
  import rat_pkg::*;
  localparam int unsigned N = 11;

  logic             clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  rat_op_e          op = OP_ADD;
  logic [N-1:0]     l = '0, k = '0, m = '0;
  logic             busy, done;
  logic [2*N-1:0]   den;
  int checks = 0, failures = 0;

  denominator_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(rat_op_e o, logic [N-1:0] ll, logic [N-1:0] kk, logic [N-1:0] mm);
    longint unsigned expv;
    int cyc;
    expv = (o == OP_DIV || o == OP_CMP) ? longint'(ll) * kk : longint'(ll) * mm;
    @(negedge clk);
    op = o; l = ll; k = kk; m = mm; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    l = N'($urandom); k = N'($urandom); m = N'($urandom);
    cyc = 1;
    while (!done && cyc < 4 * N) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != N + 1) begin
      failures++;
      $display("FAIL latency %0d expected %0d", cyc, N + 1);
    end
    checks++;
    if (longint'(den) != expv) begin
      failures++;
      $display("FAIL op=%s L=%0d K=%0d M=%0d den=%0d expected %0d", o.name(), ll, kk, mm, den, expv);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int o = 0; o < 5; o++) begin
      run(rat_op_e'(o), '1, '1, '1);
      run(rat_op_e'(o), '1, '0, '1);
      run(rat_op_e'(o), 1, '1, 2);
    end
    for (int i = 0; i < 2000; i++)
      run(rat_op_e'(3'($urandom_range(0, 4))), N'($urandom), N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
