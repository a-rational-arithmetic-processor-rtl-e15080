// denominator_unit -- the denominator hardware of the rational processor.
//
// An N x N unsigned shift-and-add multiplier that forms L*M (add, subtract,
// multiply) or L*K (divide, compare). It is built like the numerator
// hardware so that both finish together: the multiplier operand sits in a
// right-shifting register whose low bit selects 0 or L, an N+1-bit adder adds
// that into the top of the product register, and the product register
// shifts right, one step per clock.
//
// Timing: `start` loads the operands; N steps follow; `done` is high for one
// cycle N clocks after the start edge, the same cycle as the numerator
// unit's, and `den` holds the product until the next start.
//
// From the document: a standard n-bit multiplier of L by K or M with the
// same structure and execution time as the numerator hardware. The
// shift-and-add form is this design's choice to meet that.
module denominator_unit
  import rat_pkg::*;
#(
  parameter int unsigned N = 11
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  rat_op_e          op,
  input  logic [N-1:0]     l,
  input  logic [N-1:0]     k,
  input  logic [N-1:0]     m,
  output logic             busy,
  output logic             done,
  output logic [2*N-1:0]   den
);

  localparam int unsigned CW = $clog2(N + 1);

  logic [N-1:0]   l_q, mr_q;      // multiplicand, multiplier
  logic [2*N:0]   p_q;
  logic [N:0]     sum;
  logic [CW-1:0]  cnt_q;

  assign sum = p_q[2*N:N] + (mr_q[0] ? {1'b0, l_q} : '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l_q   <= '0;
      mr_q  <= '0;
      p_q   <= '0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        l_q   <= l;
        mr_q  <= (op == OP_DIV || op == OP_CMP) ? k : m;
        p_q   <= '0;
        cnt_q <= CW'(N);
        busy  <= 1'b1;
      end else if (busy) begin
        p_q   <= {sum, p_q[N-1:0]} >> 1;
        mr_q  <= mr_q >> 1;
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign den = p_q[2*N-1:0];

endmodule
