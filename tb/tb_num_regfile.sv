// tb_num_regfile -- checks the numerator register file: after a load of r1
// and r2 the four select codes must read 0, r1, r2 and r1 + r2, and the
// contents must hold while load is low.
module tb_num_regfile;
  localparam int unsigned W = 13;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic                load = 1'b0;
  logic signed [W-1:0] r1 = '0, r2 = '0, q;
  logic        [1:0]   sel = '0;
  int checks = 0, failures = 0;

  num_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(logic signed [W-1:0] e1, logic signed [W-1:0] e2);
    logic signed [W-1:0] exp_q [4];
    exp_q[0] = '0;
    exp_q[1] = e1;
    exp_q[2] = e2;
    exp_q[3] = W'(e1 + e2);
    for (int s = 0; s < 4; s++) begin
      sel = 2'(s);
      #1;
      checks++;
      if (q !== exp_q[s]) begin
        failures++;
        $display("FAIL sel=%0d q=%0d expected %0d", s, q, exp_q[s]);
      end
    end
  endtask

  initial begin
    logic signed [W-1:0] a, b;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      a = W'($urandom);
      b = W'($urandom);
      @(negedge clk);
      r1 = a; r2 = b; load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      r1 = W'($urandom); r2 = W'($urandom);   // must not be written
      check_all(a, b);
      @(negedge clk);
      check_all(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
