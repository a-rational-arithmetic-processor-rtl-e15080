// compare_unit -- condition codes for a comparison op1 # op2 of two
// rationals op1 = J/L and op2 = K/M (denominators positive).
//
// Ordering tests use the cross products: op1 # op2 exactly when
// J*M # L*K, with the operand signs applied. The numerator hardware supplies
// the signed J*M and the denominator hardware L*K; this unit applies the sign
// of K to L*K and compares. Equality compares the fields directly
// (J = K and L = M, with equal signs or both values zero), which is exact
// for operands in irreducible form; not-equal is its inverse.
//
// Purely combinational; outputs are valid whenever the products are.
//
// From the document: the equality rule on irreducible operands and the
// cross-product rule for >, <, >= and <=. Sign handling and the treatment of
// zero (+0 and -0 compare equal) are this design's choices.
module compare_unit
  import rat_pkg::*;
#(
  parameter int unsigned N = 11
) (
  input  logic                  j_sign,
  input  logic [N-1:0]          j,
  input  logic [N-1:0]          l,
  input  logic                  k_sign,
  input  logic [N-1:0]          k,
  input  logic [N-1:0]          m,
  input  logic signed [2*N+1:0] jm,    // signed J*M
  input  logic [2*N-1:0]        lk,    // unsigned L*K
  output rat_cc_t               cc
);

  logic signed [2*N+1:0] lk_s;

  assign lk_s = k_sign ? -$signed((2*N+2)'(lk)) : $signed((2*N+2)'(lk));

  always_comb begin
    cc.eq = (j == k) && (l == m) && ((j_sign == k_sign) || (j == '0));
    cc.ne = !cc.eq;
    cc.gt = jm >  lk_s;
    cc.lt = jm <  lk_s;
    cc.ge = jm >= lk_s;
    cc.le = jm <= lk_s;
  end

endmodule
