// reduction_unit -- reduces a ratio NUM/DEN to irreducible form while it
// computes gcd(NUM, DEN), without any division.
//
// X and Y start as NUM and DEN, and four counters start as a = d = 1,
// b = c = 0. Throughout, NUM' = a*X + c*Y and DEN' = b*X + d*Y, where NUM'
// and DEN' are NUM and DEN with their common factors of two removed. Both
// terms are kept odd; the smaller is subtracted from the larger (Euclid), the
// even difference is halved until odd, and a, b, c, d are updated so the two
// sums still hold (a += c and b += d on a subtract, c and d doubled when Y is
// halved, a doubled when X is halved, pairs exchanged on a swap). When X = Y,
// X is the odd part of the gcd and the reduced ratio is (a+c)/(b+d), taken
// from the two counter adders.
//
// Datapath: X and Y registers with input multiplexers; one adder of XW bits
// forming Y - X, whose zero and borrow give STOP (X = Y) and SWAP (Y < X);
// registers a, c and b, d, each pair with a CW-bit adder that serves both the
// subtract step and the outputs. reduction_control sequences it.
//
// Interface and timing: present NUM and DEN (both non-zero) with `start`;
// `done` pulses when the result is ready, after one clock per step
// (normalize, force-odd, swap or subtract) plus two; the number of steps
// grows with log2 of the operands. num_out, den_out and gcd hold until the
// next start. `ovf` reports that a counter or an output adder overflowed
// CW bits, i.e. that the reduced ratio does not fit.
//
// From the document: the algorithm, its registers and adders and the control
// flags. This design's choices: XW is 2n+1 rather than 2n bits, since the
// sum of two n x n products may need 2n+1 bits; the overflow flag; and the
// gcd output holding the odd gcd (the common power of two removed by the
// normalization is not restored, as in the document's procedure).
module reduction_unit #(
  parameter int unsigned XW = 23,   // X, Y and Y - X adder width
  parameter int unsigned CW = 11    // a, b, c, d and their adders
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [XW-1:0] num_in,
  input  logic [XW-1:0] den_in,
  output logic          busy,
  output logic          done,
  output logic [CW-1:0] num_out,
  output logic [CW-1:0] den_out,
  output logic [XW-1:0] gcd,
  output logic          ovf
);

  logic [XW-1:0] x_q, y_q;
  logic [CW-1:0] a_q, b_q, c_q, d_q;
  logic [XW:0]   diff;              // Y - X with borrow
  logic [CW:0]   ac_sum, bd_sum;    // counter adders with carry
  logic          ovf_q;
  logic init, shr_x, shr_y, shl_a, shl_cd, swap, subt;

  assign diff   = {1'b0, y_q} - {1'b0, x_q};
  assign ac_sum = {1'b0, a_q} + {1'b0, c_q};
  assign bd_sum = {1'b0, b_q} + {1'b0, d_q};

  reduction_control u_ctrl (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (start),
    .x0     (x_q[0]),
    .y0     (y_q[0]),
    .stop   (diff == '0),
    .swap_c (diff[XW]),
    .init   (init),
    .shr_x  (shr_x),
    .shr_y  (shr_y),
    .shl_a  (shl_a),
    .shl_cd (shl_cd),
    .swap   (swap),
    .subt   (subt),
    .busy   (busy),
    .done   (done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q   <= '0;
      y_q   <= '0;
      a_q   <= '0;
      b_q   <= '0;
      c_q   <= '0;
      d_q   <= '0;
      ovf_q <= 1'b0;
    end else if (init) begin
      x_q   <= num_in;
      y_q   <= den_in;
      a_q   <= CW'(1);
      b_q   <= '0;
      c_q   <= '0;
      d_q   <= CW'(1);
      ovf_q <= 1'b0;
    end else begin
      if (shr_x) x_q <= x_q >> 1;
      if (shr_y) y_q <= y_q >> 1;
      if (shl_a) begin
        a_q <= a_q << 1;
        if (a_q[CW-1]) ovf_q <= 1'b1;
      end
      if (shl_cd) begin
        c_q <= c_q << 1;
        d_q <= d_q << 1;
        if (c_q[CW-1] || d_q[CW-1]) ovf_q <= 1'b1;
      end
      if (swap) begin
        x_q <= y_q;
        y_q <= x_q;
        a_q <= c_q;
        c_q <= a_q;
        b_q <= d_q;
        d_q <= b_q;
      end
      if (subt) begin
        y_q <= diff[XW-1:0];
        a_q <= ac_sum[CW-1:0];
        b_q <= bd_sum[CW-1:0];
        if (ac_sum[CW] || bd_sum[CW]) ovf_q <= 1'b1;
      end
    end
  end

  assign num_out = ac_sum[CW-1:0];
  assign den_out = bd_sum[CW-1:0];
  assign gcd     = x_q;
  assign ovf     = ovf_q | ac_sum[CW] | bd_sum[CW];

  // The algorithm needs two non-zero terms; with a zero term it never ends.
  always_comb begin
    if (rst_n && start) begin
      a_nonzero: assert (num_in != '0 && den_in != '0)
        else $error("reduction_unit: NUM and DEN must be non-zero");
    end
  end

endmodule
