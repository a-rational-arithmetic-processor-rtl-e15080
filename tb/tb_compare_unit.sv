// tb_compare_unit -- checks the condition codes against exact rational
// comparison of random signed operands with positive denominators. The
// products it feeds are computed here; equality is tested on operands in
// irreducible form, and equal pairs are injected deliberately.
module tb_compare_unit;
  import rat_pkg::*;
  import rat_ref_pkg::*;
  localparam int unsigned N = 11;

  logic                  j_sign, k_sign;
  logic [N-1:0]          j, l, k, m;
  logic signed [2*N+1:0] jm;
  logic [2*N-1:0]        lk;
  rat_cc_t               cc;
  int checks = 0, failures = 0;
  int n_eq = 0, n_gt = 0, n_lt = 0;

  compare_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Random irreducible operand with a non-zero denominator.
  task automatic rand_op(output logic s, output logic [N-1:0] nn, output logic [N-1:0] dd);
    longint unsigned g;
    s  = 1'($urandom);
    nn = N'($urandom_range(0, (1 << N) - 1));
    dd = N'($urandom_range(1, (1 << N) - 1));
    if ($urandom_range(0, 3) == 0) begin
      nn = N'($urandom_range(0, 15));
      dd = N'($urandom_range(1, 15));
    end
    g  = ref_gcd(64'(nn), 64'(dd));
    nn = N'(nn / g);
    dd = N'(dd / g);
  endtask

  initial begin
    longint lhs, rhs;
    rat_cc_t want;
    for (int i = 0; i < 20000; i++) begin
      rand_op(j_sign, j, l);
      if ($urandom_range(0, 4) == 0) begin
        k_sign = j_sign; k = j; m = l;
        if (j == '0) k_sign = 1'($urandom);
      end else rand_op(k_sign, k, m);
      lhs = (j_sign ? -1 : 1) * (longint'(j) * m);
      rhs = (k_sign ? -1 : 1) * (longint'(k) * l);
      jm  = (2*N+2)'(lhs);
      lk  = (2*N)'(longint'(k) * l);
      want.eq = (lhs == rhs);
      want.ne = (lhs != rhs);
      want.gt = (lhs > rhs);
      want.lt = (lhs < rhs);
      want.ge = (lhs >= rhs);
      want.le = (lhs <= rhs);
      #1;
      checks++;
      if (cc !== want) begin
        failures++;
        $display("FAIL %0d%0d/%0d vs %0d%0d/%0d: cc=%b expected %b",
                 j_sign, j, l, k_sign, k, m, cc, want);
      end
      if (want.eq) n_eq++;
      if (want.gt) n_gt++;
      if (want.lt) n_lt++;
    end
    checks++;
    if (n_eq == 0 || n_gt == 0 || n_lt == 0) begin
      failures++;
      $display("FAIL coverage eq=%0d gt=%0d lt=%0d", n_eq, n_gt, n_lt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
