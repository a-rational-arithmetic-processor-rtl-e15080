// tb_rat_processor -- end-to-end test of the rational processor at its
// default size (11-bit numerators and denominators).
//
// Random signed operands go through all five operations and each result is
// compared with exact integer arithmetic: the reduced ratio (numerator and
// denominator divided by their gcd, sign in front), the gcd's odd part, the
// overflow flag when the reduced ratio does not fit, the divide-by-zero
// flag, and the six condition codes of a comparison (whose operands are
// given in irreducible form, as the equality test requires). The latency is checked
// too: N + 2 cycles for a comparison or a result decided without reduction,
// and N + 4 plus one cycle per reduction step otherwise. The worked examples
// 3/2 * 4/9 = 2/3 and 420/231 (as 420/1 * 1/231) = 20/11 come first. Every
// mechanism of the design is counted and must occur: each operation,
// normalize, force-odd of X and Y, swap, subtract, overflow, zero result,
// division by zero, and each comparison outcome.
module tb_rat_processor;
  import rat_pkg::*;
  import rat_ref_pkg::*;
  localparam int unsigned N = 11;

  logic          clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  rat_op_e       op = OP_ADD;
  logic          a_sign = 1'b0, b_sign = 1'b0;
  logic [N-1:0]  a_num = '0, a_den = '1, b_num = '0, b_den = '1;
  logic          busy, done, res_sign, ovf, div_zero;
  logic [N-1:0]  res_num, res_den;
  logic [2*N:0]  res_gcd;
  rat_cc_t       cc;
  int checks = 0, failures = 0;

  typedef enum int {
    M_ADD, M_SUB, M_MUL, M_DIV, M_CMP, M_NORM, M_ODDX, M_ODDY, M_SWAP, M_SUBT,
    M_OVF, M_ZERO, M_DIV0, M_EQ, M_GT, M_LT, M_COUNT
  } mech_e;
  int unsigned mech [M_COUNT];

  rat_processor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count the reduction steps as the control issues them.
  always @(posedge clk) begin
    if (dut.u_red.shr_x && dut.u_red.shr_y) mech[M_NORM]++;
    if (dut.u_red.shl_a)                    mech[M_ODDX]++;
    if (dut.u_red.shl_cd)                   mech[M_ODDY]++;
    if (dut.u_red.swap)                     mech[M_SWAP]++;
    if (dut.u_red.subt)                     mech[M_SUBT]++;
  end

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  task automatic run(rat_op_e o, logic as, logic [N-1:0] an, logic [N-1:0] ad,
                     logic bs, logic [N-1:0] bn, logic [N-1:0] bd);
    longint          sn, lhs, rhs;
    longint unsigned mag, den, g, rn, rd;
    logic            exp_ovf, exp_div0, reduced;
    rat_cc_t         want;
    int              cyc, exp_cyc;
    string           id;
    id = $sformatf("%s %s%0d/%0d, %s%0d/%0d", o.name(), as ? "-" : "+", an, ad,
                   bs ? "-" : "+", bn, bd);
    // Reference.
    unique case (o)
      OP_ADD: begin sn = (as ? -1 : 1) * longint'(an) * bd + (bs ? -1 : 1) * longint'(bn) * ad; den = longint'(ad) * bd; end
      OP_SUB: begin sn = (as ? -1 : 1) * longint'(an) * bd - (bs ? -1 : 1) * longint'(bn) * ad; den = longint'(ad) * bd; end
      OP_MUL: begin sn = ((as ^ bs) ? -1 : 1) * longint'(an) * bn; den = longint'(ad) * bd; end
      default: begin sn = ((as ^ bs) ? -1 : 1) * longint'(an) * bd; den = longint'(ad) * bn; end
    endcase
    mag      = (sn < 0) ? -sn : sn;
    exp_div0 = (o != OP_CMP) && (den == 0);
    reduced  = (o != OP_CMP) && !exp_div0 && (mag != 0);
    g        = reduced ? ref_gcd(mag, den) : 1;
    rn       = mag / g;
    rd       = exp_div0 ? 0 : (mag == 0 && o != OP_CMP) ? 1 : den / g;
    exp_ovf  = reduced && (rn >= (64'd1 << N) || rd >= (64'd1 << N));
    exp_cyc  = reduced ? int'(N) + 4 + int'(ref_red_steps(mag, den)) : int'(N) + 2;
    lhs      = (as ? -1 : 1) * longint'(an) * bd;
    rhs      = (bs ? -1 : 1) * longint'(bn) * ad;
    want.eq  = (lhs == rhs);
    want.ne  = (lhs != rhs);
    want.gt  = (lhs >  rhs);
    want.lt  = (lhs <  rhs);
    want.ge  = (lhs >= rhs);
    want.le  = (lhs <= rhs);
    // Drive.
    @(negedge clk);
    op = o; a_sign = as; a_num = an; a_den = ad; b_sign = bs; b_num = bn; b_den = bd;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    a_num = N'($urandom); b_num = N'($urandom);
    cyc = 1;
    while (!done && cyc < 1000) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != exp_cyc) fail($sformatf("%s: latency %0d, expected %0d", id, cyc, exp_cyc));
    // Compare.
    checks++;
    if (o == OP_CMP) begin
      mech[M_CMP]++;
      if (want.eq) mech[M_EQ]++;
      if (want.gt) mech[M_GT]++;
      if (want.lt) mech[M_LT]++;
      if (cc !== want) fail($sformatf("%s: cc=%b expected %b", id, cc, want));
    end else begin
      mech[int'(o)]++;
      if (exp_div0) mech[M_DIV0]++;
      if (exp_ovf) mech[M_OVF]++;
      if (!exp_div0 && mag == 0) mech[M_ZERO]++;
      if (div_zero !== exp_div0 || ovf !== exp_ovf)
        fail($sformatf("%s: div_zero=%0d ovf=%0d expected %0d %0d", id, div_zero, ovf, exp_div0, exp_ovf));
      else if (!exp_div0 && !exp_ovf) begin
        if (res_sign !== (sn < 0) || res_num != N'(rn) || res_den != N'(rd))
          fail($sformatf("%s: got %s%0d/%0d expected %s%0d/%0d", id, res_sign ? "-" : "+",
                         res_num, res_den, (sn < 0) ? "-" : "+", rn, rd));
        else if (reduced && res_gcd != (2*N+1)'(ref_odd_gcd(mag, den)))
          fail($sformatf("%s: gcd %0d expected %0d", id, res_gcd, ref_odd_gcd(mag, den)));
      end
    end
  endtask

  function automatic logic [N-1:0] rand_val(bit nonzero);
    logic [N-1:0] v;
    int unsigned  kind;
    kind = $urandom_range(0, 3);
    unique case (kind)
      0:       v = N'($urandom_range(0, 15));
      1:       v = N'($urandom_range(0, 255));
      default: v = N'($urandom);
    endcase
    if (nonzero && v == '0) v = 1;
    return v;
  endfunction

  initial begin
    logic [N-1:0] an, ad, bn, bd;
    logic         as, bs;
    rat_op_e      o;
    longint unsigned g;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(OP_MUL, 1'b0, 3, 2, 1'b0, 4, 9);        // 12/18 -> 2/3
    run(OP_MUL, 1'b0, 420, 1, 1'b0, 1, 231);    // 420/231 -> 20/11
    run(OP_SUB, 1'b0, 5, 7, 1'b0, 5, 7);        // zero result
    run(OP_DIV, 1'b1, 5, 7, 1'b0, 0, 3);        // division by zero
    run(OP_CMP, 1'b0, 2, 3, 1'b0, 2, 3);        // equal
    run(OP_ADD, 1'b0, '1, 1, 1'b0, '1, 1);      // overflow
    for (int i = 0; i < 6000; i++) begin
      as = 1'($urandom); bs = 1'($urandom);
      an = rand_val(0); bn = rand_val(0);
      ad = rand_val($urandom_range(0, 99) != 0);
      bd = rand_val($urandom_range(0, 99) != 0);
      o  = rat_op_e'(3'($urandom_range(0, 4)));
      if (o == OP_CMP) begin
        // Equality is defined on irreducible operands (zero as 0/1).
        if (ad == '0) ad = 1;
        if (bd == '0) bd = 1;
        g  = ref_gcd(64'(an), 64'(ad)); an = N'(an / g); ad = N'(ad / g);
        g  = ref_gcd(64'(bn), 64'(bd)); bn = N'(bn / g); bd = N'(bd / g);
      end
      if ($urandom_range(0, 9) == 0) begin bs = as; bn = an; bd = ad; end
      run(o, as, an, ad, bs, bn, bd);
    end
    for (int mi = 0; mi < M_COUNT; mi++) begin
      checks++;
      $display("mechanism %-7s %0d", mech_e'(mi), mech[mi]);
      if (mech[mi] == 0) fail($sformatf("mechanism %s never happened", mech_e'(mi)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
