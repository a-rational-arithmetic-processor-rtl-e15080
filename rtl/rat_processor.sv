// rat_processor -- a rational arithmetic processor.
//
// Numbers are ratios: a sign and two N-bit magnitudes, numerator and
// (non-zero) denominator. For operands J/L and K/M the processor adds,
// subtracts, multiplies or divides by the cross-product rules
//     J/L +- K/M = (J*M +- K*L) / (L*M)    J/L * K/M = J*K / (L*M)
//     J/L / K/M  = J*M / (L*K)
// and returns the result in irreducible form; or it compares the operands
// and returns the condition codes. The numerator hardware (one adder and a
// four-word register file, bit-serial over N clocks) and the denominator
// multiplier run in parallel; their outputs then feed the reduction
// hardware, which divides out the gcd by Euclid-style subtraction, or feed
// the comparator.
//
// Interface: apply op and both operands with `start` for one clock while
// `busy` is low. `done` pulses for one clock when res_* (or cc, for OP_CMP)
// are valid; they hold until the next start. Latency, counted from the
// cycle in which start is applied: `done` is high N + 2 cycles later for a
// comparison or for a result decided without reduction, and N + 4 + S
// cycles later when the reduction takes S steps (S grows with the
// logarithm of the operands). A zero numerator gives +0/1 without reduction. A zero
// product denominator (a zero operand denominator, or division by 0/M) sets
// `div_zero` and leaves res_* at 0/0. `ovf` means the reduced result does
// not fit in N bits; res_* are then not meaningful.
//
// From the document: the operations, the split into numerator, denominator
// and reduction hardware, the reduction after every arithmetic operation, and
// the comparison rules. This design's choices: the sign-magnitude operand
// format's sign handling, the zero and divide-by-zero results, the overflow
// flag, and the start/done handshake.
module rat_processor
  import rat_pkg::*;
#(
  parameter int unsigned N = 11      // magnitude bits of numerator and denominator
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  rat_op_e       op,
  input  logic          a_sign,      // first operand J/L
  input  logic [N-1:0]  a_num,
  input  logic [N-1:0]  a_den,
  input  logic          b_sign,      // second operand K/M
  input  logic [N-1:0]  b_num,
  input  logic [N-1:0]  b_den,
  output logic          busy,
  output logic          done,
  output logic          res_sign,
  output logic [N-1:0]  res_num,
  output logic [N-1:0]  res_den,
  output rat_cc_t       cc,
  output logic [2*N:0]  res_gcd,     // odd part of the gcd divided out
  output logic          ovf,
  output logic          div_zero
);

  localparam int unsigned XW = 2*N + 1;

  typedef enum logic [1:0] {S_IDLE, S_MULT, S_REDUCE} state_e;
  state_e state_q;

  rat_op_e              op_q;
  logic                 js_q, ks_q;
  logic [N-1:0]         j_q, l_q, k_q, m_q;
  logic                 num_busy, num_done, den_busy, den_done;
  logic signed [2*N+1:0] num_p;
  logic [2*N-1:0]       den_p;
  logic [XW-1:0]        num_mag;
  logic                 red_start, red_busy, red_done, red_ovf;
  logic [N-1:0]         red_num, red_den;
  logic [XW-1:0]        red_gcd;
  rat_cc_t              cc_w;
  logic                 neg_q;

  // Operand latch: the comparator reads the operands after the products.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q <= OP_ADD;
      js_q <= 1'b0;
      ks_q <= 1'b0;
      j_q  <= '0;
      l_q  <= '0;
      k_q  <= '0;
      m_q  <= '0;
    end else if (start && !busy) begin
      op_q <= op;
      js_q <= a_sign;
      ks_q <= b_sign;
      j_q  <= a_num;
      l_q  <= a_den;
      k_q  <= b_num;
      m_q  <= b_den;
    end
  end

  numerator_unit #(.N(N)) u_num (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (start && !busy),
    .op     (op),
    .j_sign (a_sign),
    .j      (a_num),
    .l      (a_den),
    .k_sign (b_sign),
    .k      (b_num),
    .m      (b_den),
    .busy   (num_busy),
    .done   (num_done),
    .num    (num_p)
  );

  denominator_unit #(.N(N)) u_den (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start && !busy),
    .op    (op),
    .l     (a_den),
    .k     (b_num),
    .m     (b_den),
    .busy  (den_busy),
    .done  (den_done),
    .den   (den_p)
  );

  compare_unit #(.N(N)) u_cmp (
    .j_sign (js_q),
    .j      (j_q),
    .l      (l_q),
    .k_sign (ks_q),
    .k      (k_q),
    .m      (m_q),
    .jm     (num_p),
    .lk     (den_p),
    .cc     (cc_w)
  );

  // Magnitude of the signed numerator; it is below 2^(2N+1).
  assign num_mag = num_p[2*N+1] ? XW'(-num_p) : XW'(num_p);

  assign red_start = (state_q == S_MULT) && num_done && (op_q != OP_CMP)
                     && (den_p != '0) && (num_p != '0);

  reduction_unit #(.XW(XW), .CW(N)) u_red (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (red_start),
    .num_in  (num_mag),
    .den_in  (XW'(den_p)),
    .busy    (red_busy),
    .done    (red_done),
    .num_out (red_num),
    .den_out (red_den),
    .gcd     (red_gcd),
    .ovf     (red_ovf)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      done     <= 1'b0;
      neg_q    <= 1'b0;
      res_sign <= 1'b0;
      res_num  <= '0;
      res_den  <= '0;
      res_gcd  <= '0;
      cc       <= '0;
      ovf      <= 1'b0;
      div_zero <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) state_q <= S_MULT;
        S_MULT: if (num_done) begin
          neg_q <= num_p[2*N+1];
          if (op_q == OP_CMP) begin
            cc      <= cc_w;
            done    <= 1'b1;
            state_q <= S_IDLE;
          end else if (den_p == '0) begin
            res_sign <= 1'b0;
            res_num  <= '0;
            res_den  <= '0;
            ovf      <= 1'b0;
            div_zero <= 1'b1;
            done     <= 1'b1;
            state_q  <= S_IDLE;
          end else if (num_p == '0) begin
            res_sign <= 1'b0;
            res_num  <= '0;
            res_den  <= N'(1);
            ovf      <= 1'b0;
            div_zero <= 1'b0;
            done     <= 1'b1;
            state_q  <= S_IDLE;
          end else begin
            state_q <= S_REDUCE;
          end
        end
        default: if (red_done) begin       // S_REDUCE
          res_sign <= neg_q;
          res_num  <= red_num;
          res_den  <= red_den;
          res_gcd  <= red_gcd;
          ovf      <= red_ovf;
          div_zero <= 1'b0;
          done     <= 1'b1;
          state_q  <= S_IDLE;
        end
      endcase
    end
  end

  assign busy = (state_q != S_IDLE);

  // The two product units are started together and must finish together.
  // While the products are formed both units are busy; while reducing, the
  // reduction unit is busy until it reports done.
  always_comb begin
    if (rst_n) begin
      a_lockstep: assert (num_done == den_done && num_busy == den_busy)
        else $error("rat_processor: numerator and denominator units out of step");
      if (state_q == S_REDUCE) begin
        a_reducing: assert (red_busy || red_done)
          else $error("rat_processor: reduction unit idle while reducing");
      end
    end
  end

endmodule
