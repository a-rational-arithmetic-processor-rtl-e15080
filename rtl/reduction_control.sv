// reduction_control -- the sequencer of the reduction hardware.
//
// Each clock it looks at the low bits x0 and y0 of the X and Y registers and
// at the two flags from the X/Y adder (STOP when X = Y, SWAP when Y < X) and
// issues exactly one step of the reduction algorithm:
//
//   both x0 and y0 zero  -> normalize: shift X and Y right
//   x0 zero              -> force X odd: shift X right, shift a left
//   y0 zero              -> force Y odd: shift Y right, shift c and d left
//   STOP                 -> finished; X holds the gcd
//   SWAP                 -> exchange X<->Y, a<->c, b<->d
//   otherwise            -> subtract: Y = Y - X, a = a + c, b = b + d
//
// Because X stays odd once it has been made odd, one priority list covers
// every loop of the algorithm: the initial normalization, forcing each term
// odd, and the swap / subtract / force-odd cycle. Forcing the initial Y odd
// shifts c as well as d; c is still zero then, so this is the same step.
//
// Timing: `init` is `start` itself, passed on in the same cycle (the datapath
// loads X, Y, a, b, c, d at that edge); steps follow one per clock; `done` is high for
// one cycle after the clock in which STOP was seen, and `busy` is high from
// the start edge until then.
//
// From the document: the control signals named in the reduction figure and
// the order of the steps. Merging the loops into one priority decision, one
// step per clock, is this design's choice.
module reduction_control (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic x0,
  input  logic y0,
  input  logic stop,     // X = Y
  input  logic swap_c,   // Y < X
  output logic init,     // load X, Y, a = d = 1, b = c = 0
  output logic shr_x,    // X = X / 2
  output logic shr_y,    // Y = Y / 2
  output logic shl_a,    // a = a * 2
  output logic shl_cd,   // c = c * 2, d = d * 2
  output logic swap,     // exchange (X, Y), (a, c), (b, d)
  output logic subt,     // Y = Y - X, a = a + c, b = b + d
  output logic busy,
  output logic done
);

  typedef enum logic {S_IDLE, S_RUN} state_e;
  state_e state_q;
  logic   finish;

  assign init = start;

  always_comb begin
    shr_x  = 1'b0;
    shr_y  = 1'b0;
    shl_a  = 1'b0;
    shl_cd = 1'b0;
    swap   = 1'b0;
    subt   = 1'b0;
    finish = 1'b0;
    if (state_q == S_RUN) begin
      if (!x0 && !y0) begin
        shr_x = 1'b1;
        shr_y = 1'b1;
      end else if (!x0) begin
        shr_x = 1'b1;
        shl_a = 1'b1;
      end else if (!y0) begin
        shr_y  = 1'b1;
        shl_cd = 1'b1;
      end else if (stop) begin
        finish = 1'b1;
      end else if (swap_c) begin
        swap = 1'b1;
      end else begin
        subt = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      done    <= 1'b0;
    end else begin
      done <= finish;
      if (start)       state_q <= S_RUN;
      else if (finish) state_q <= S_IDLE;
    end
  end

  assign busy = (state_q == S_RUN);

endmodule
