// numerator_unit -- the numerator hardware of the rational processor.
//
// For operands J/L and K/M it forms, bit-serially, the numerator of the
// result:  add J*M + K*L,  subtract J*M - K*L,  multiply J*K,  divide and
// compare J*M, each with the operand signs applied. One adder does it, using
//     J*M + K*L = sum_i 2^i * (j_i*M + k_i*L):
// the register file holds 0, r1, r2 and r1 + r2, its multiplexer is
// addressed by the low bits {k_i, j_i} of the K and J shift registers, and
// the selected word is added into the top of the NUM register, which then
// shifts right together with J and K. What is loaded into the register file
// chooses the operation (r1 = M, r2 = L for add; r2 = -L for subtract;
// r1 = K or M with r2 = 0 for multiply, divide and compare).
//
// Timing: `start` (one cycle, with the operands) loads the registers; N
// add-and-shift steps follow, one per clock; `done` is high for one cycle N
// clocks after the start edge, and `num` holds the result until the next
// start. `busy` is high while the steps run.
//
// From the document: the register-file scheme, the mux addressing, the
// single adder feeding a right-shifting NUM register, and the register
// contents for add, subtract, multiply and divide. This design's choices:
// signed operands applied by negating the register words, a K register
// loaded with zero for multiply, divide and compare (so that register 3 is
// never selected when registers 2 and 3 hold zero), and an adder of N+3 bits
// rather than n bits, because the sum of two n x n products needs 2n+1 bits
// and a sign.
module numerator_unit
  import rat_pkg::*;
#(
  parameter int unsigned N = 11        // magnitude bits of each operand half
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  rat_op_e               op,
  input  logic                  j_sign,   // sign of the first operand J/L
  input  logic [N-1:0]          j,
  input  logic [N-1:0]          l,
  input  logic                  k_sign,   // sign of the second operand K/M
  input  logic [N-1:0]          k,
  input  logic [N-1:0]          m,
  output logic                  busy,
  output logic                  done,
  output logic signed [2*N+1:0] num      // signed result numerator
);

  localparam int unsigned RW = N + 2;        // register-file word
  localparam int unsigned AW = N + 3;        // adder width
  localparam int unsigned PW = 2*N + 3;      // NUM shift register
  localparam int unsigned CW = $clog2(N + 1);

  logic signed [RW-1:0] m_w, l_w, k_w, r1, r2, q;
  logic        [N-1:0]  j_q, k_q;
  logic signed [PW-1:0] p_q;
  logic signed [AW-1:0] sum;
  logic        [CW-1:0] cnt_q;

  assign m_w = RW'(m);
  assign l_w = RW'(l);
  assign k_w = RW'(k);

  // Register-file contents for each operation.
  always_comb begin
    r1 = '0;
    r2 = '0;
    unique case (op)
      OP_ADD: begin
        r1 = j_sign ? -m_w : m_w;
        r2 = k_sign ? -l_w : l_w;
      end
      OP_SUB: begin
        r1 = j_sign ? -m_w : m_w;
        r2 = k_sign ? l_w : -l_w;
      end
      OP_MUL:  r1 = (j_sign ^ k_sign) ? -k_w : k_w;
      OP_DIV:  r1 = (j_sign ^ k_sign) ? -m_w : m_w;
      default: r1 = j_sign ? -m_w : m_w;      // OP_CMP
    endcase
  end

  num_regfile #(.W(RW)) u_regfile (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (start),
    .r1    (r1),
    .r2    (r2),
    .sel   ({k_q[0], j_q[0]}),
    .q     (q)
  );

  // The adder adds the selected word into the top of NUM.
  assign sum = p_q[PW-1:N] + AW'(q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      j_q   <= '0;
      k_q   <= '0;
      p_q   <= '0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        j_q   <= j;
        k_q   <= (op == OP_ADD || op == OP_SUB) ? k : '0;
        p_q   <= '0;
        cnt_q <= CW'(N);
        busy  <= 1'b1;
      end else if (busy) begin
        p_q   <= {sum[AW-1], sum, p_q[N-1:1]};   // add, then arithmetic right shift
        j_q   <= j_q >> 1;
        k_q   <= k_q >> 1;
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign num = p_q[2*N+1:0];

endmodule
