// num_regfile -- the four-register file and 4 x n multiplexer of the
// numerator hardware.
//
// Register 0 always reads zero; registers 1, 2 and 3 are written together on
// `load` with r1, r2 and r1 + r2. For rational addition the caller loads
// r1 = M and r2 = L, so the file holds 0, M, L, L+M as in the document's
// numerator figure; other operations load other values (zero, -L, a signed
// copy of K or M). The read port is a plain multiplexer addressed by
// sel = {k_i, j_i}, the low bits of the K and J shift registers, so in every
// step the word selected is j_i*r1 + k_i*r2. Reads are combinational; the
// write takes effect at the next clock edge.
//
// The document gives the four contents and the multiplexer. Forming
// register 3 with an adder at load time, the signed (two's complement)
// contents and the width W are choices of this design.
module num_regfile #(
  parameter int unsigned W = 13   // register width; N + 2 for N-bit operands
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,   // write r1, r2 and r1 + r2
  input  logic signed [W-1:0] r1,
  input  logic signed [W-1:0] r2,
  input  logic        [1:0]   sel,    // {k_i, j_i}
  output logic signed [W-1:0] q
);

  logic signed [W-1:0] regs [1:3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs[1] <= '0;
      regs[2] <= '0;
      regs[3] <= '0;
    end else if (load) begin
      regs[1] <= r1;
      regs[2] <= r2;
      regs[3] <= r1 + r2;
    end
  end

  always_comb begin
    unique case (sel)
      2'd0:    q = '0;
      2'd1:    q = regs[1];
      2'd2:    q = regs[2];
      default: q = regs[3];
    endcase
  end

endmodule
