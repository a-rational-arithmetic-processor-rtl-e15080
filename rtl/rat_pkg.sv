// rat_pkg -- types shared by the rational arithmetic processor.
//
// A rational operand is held as a sign bit plus an unsigned numerator and an
// unsigned, non-zero denominator, each N bits wide (the 24-bit example format
// is 1 + 11 bits for each half, so N = 11 by default in the modules). The
// package defines the operation code that selects what the numerator
// hardware computes and the set of condition codes a comparison returns.
// The five operations follow the document; the encodings are this design's.
package rat_pkg;

  // Operation selected at the processor's start.
  typedef enum logic [2:0] {
    OP_ADD = 3'd0,   // J/L + K/M = (J*M + K*L) / (L*M)
    OP_SUB = 3'd1,   // J/L - K/M = (J*M - K*L) / (L*M)
    OP_MUL = 3'd2,   // J/L * K/M = (J*K) / (L*M)
    OP_DIV = 3'd3,   // J/L / K/M = (J*M) / (L*K)
    OP_CMP = 3'd4    // condition codes from J*M against L*K
  } rat_op_e;

  // Truth values of the comparisons op1 # op2.
  typedef struct packed {
    logic eq;
    logic ne;
    logic gt;
    logic lt;
    logic ge;
    logic le;
  } rat_cc_t;

endpackage
