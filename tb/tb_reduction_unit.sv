// tb_reduction_unit -- checks the reduction hardware against a remainder-
// based gcd: the outputs must be NUM/g and DEN/g with g = gcd(NUM, DEN), the
// gcd output the odd part of g, and the overflow flag set exactly when a
// reduced term needs more than CW bits. The run length must be the number
// of algorithm steps plus two clocks, and no more than three steps per bit
// of the operands (the logarithmic worst case). It includes the worked example
// 420/231 = 20/11 (gcd 21), 12/18 = 2/3 and the forms 2/6, 3/9 of 1/3, then random ratios built as
// p*g / q*g and fully random ones.
module tb_reduction_unit;
  import rat_ref_pkg::*;
  localparam int unsigned XW = 23;
  localparam int unsigned CW = 11;

  logic          clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [XW-1:0] num_in = '0, den_in = '0, gcd;
  logic [CW-1:0] num_out, den_out;
  logic          busy, done, ovf;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_fit = 0;

  reduction_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(longint unsigned n, longint unsigned d);
    longint unsigned g, rn, rd;
    logic            exp_ovf;
    int              cyc, exp_cyc;
    g       = ref_gcd(n, d);
    rn      = n / g;
    rd      = d / g;
    exp_ovf = (rn >= (64'd1 << CW)) || (rd >= (64'd1 << CW));
    exp_cyc = int'(ref_red_steps(n, d)) + 2;
    @(negedge clk);
    num_in = XW'(n); den_in = XW'(d); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    num_in = XW'($urandom); den_in = XW'($urandom);
    cyc = 1;
    while (!done && cyc < 100 * XW) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != exp_cyc) begin
      failures++;
      $display("FAIL %0d/%0d: %0d clocks, expected %0d", n, d, cyc, exp_cyc);
    end
    // Worst case grows with the operand lengths: every subtract is followed
    // by at least one halving and is preceded by at most one swap, so the
    // steps are at most three per bit of NUM and DEN.
    checks++;
    if (cyc - 2 > 3 * ($clog2(n + 1) + $clog2(d + 1))) begin
      failures++;
      $display("FAIL %0d/%0d: %0d steps exceed the logarithmic bound", n, d, cyc - 2);
    end
    checks++;
    if (ovf !== exp_ovf) begin
      failures++;
      $display("FAIL %0d/%0d: ovf=%0d expected %0d", n, d, ovf, exp_ovf);
    end
    if (exp_ovf) n_ovf++;
    else begin
      n_fit++;
      checks++;
      if (num_out != CW'(rn) || den_out != CW'(rd) || gcd != XW'(ref_odd_gcd(n, d))) begin
        failures++;
        $display("FAIL %0d/%0d: got %0d/%0d gcd %0d, expected %0d/%0d gcd %0d",
                 n, d, num_out, den_out, gcd, rn, rd, ref_odd_gcd(n, d));
      end
    end
  endtask

  initial begin
    longint unsigned p, q, g;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(420, 231);
    run(12, 18);
    run(2, 6);        // equivalent forms of 1/3
    run(3, 9);
    run(1, 1);
    run(7, 7);
    run(64, 4);
    run(1, (64'd1 << XW) - 1);
    run((64'd1 << XW) - 1, (64'd1 << XW) - 2);
    for (int i = 0; i < 3000; i++) begin
      p = 64'($urandom_range(1, (1 << CW) - 1));
      q = 64'($urandom_range(1, (1 << CW) - 1));
      g = 64'($urandom_range(1, 4000));
      if ((p * g) < (64'd1 << XW) && (q * g) < (64'd1 << XW)) run(p * g, q * g);
      run(64'($urandom_range(1, (1 << XW) - 1)), 64'($urandom_range(1, (1 << XW) - 1)));
    end
    checks++;
    if (n_ovf == 0 || n_fit == 0) begin
      failures++;
      $display("FAIL coverage: %0d overflowing and %0d fitting ratios", n_ovf, n_fit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
