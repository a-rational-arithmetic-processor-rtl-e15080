// tb_reduction_control -- checks the reduction sequencer's decision table.
// In the running state every combination of x0, y0, STOP and SWAP must
// produce exactly the step the reduction algorithm takes next (normalize,
// force X odd, force Y odd, stop, swap, subtract); when idle no step may be
// issued; STOP must end the run with one `done` pulse on the next clock.
module tb_reduction_control;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic x0 = 1'b1, y0 = 1'b1, stop = 1'b0, swap_c = 1'b0;
  logic init, shr_x, shr_y, shl_a, shl_cd, swap, subt, busy, done;
  int checks = 0, failures = 0;

  reduction_control dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(string what, logic [6:0] got, logic [6:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: {shr_x,shr_y,shl_a,shl_cd,swap,subt,stop} = %b expected %b",
               what, got, want);
    end
  endtask

  // Expected step, in the order {shr_x, shr_y, shl_a, shl_cd, swap, subt, finish}.
  function automatic logic [6:0] model(logic xb, logic yb, logic st, logic sw);
    if (!xb && !yb) return 7'b1100000;
    if (!xb)        return 7'b1010000;
    if (!yb)        return 7'b0101000;
    if (st)         return 7'b0000001;
    if (sw)         return 7'b0000100;
    return 7'b0000010;
  endfunction

  initial begin
    logic [6:0] got, want;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Idle: nothing happens, start gives init.
    @(negedge clk);
    x0 = 1'b0; y0 = 1'b0;
    #1;
    expect_out("idle", {shr_x, shr_y, shl_a, shl_cd, swap, subt, 1'b0}, '0);
    checks++;
    if (busy || init) begin failures++; $display("FAIL idle busy/init"); end
    start = 1'b1;
    #1;
    checks++;
    if (!init) begin failures++; $display("FAIL init not given with start"); end
    @(negedge clk);
    start = 1'b0;
    // Running: every input combination except stop with both odd.
    for (int rep = 0; rep < 4; rep++) begin
      for (int v = 0; v < 16; v++) begin
        {x0, y0, stop, swap_c} = 4'(v);
        if (x0 && y0 && stop) continue;
        #1;
        got  = {shr_x, shr_y, shl_a, shl_cd, swap, subt, 1'b0};
        want = model(x0, y0, stop, swap_c);
        expect_out($sformatf("run x0=%0d y0=%0d stop=%0d swap=%0d", x0, y0, stop, swap_c), got, want);
        checks++;
        if (!busy || done) begin failures++; $display("FAIL busy/done while running"); end
        @(negedge clk);
      end
    end
    // Stop: one done pulse, then idle.
    {x0, y0, stop, swap_c} = 4'b1110;
    #1;
    expect_out("stop", {shr_x, shr_y, shl_a, shl_cd, swap, subt, 1'b0}, '0);
    @(negedge clk);
    checks++;
    if (!done || busy) begin failures++; $display("FAIL no done after stop"); end
    {x0, y0, stop, swap_c} = 4'b0000;
    @(negedge clk);
    checks++;
    if (done || busy) begin failures++; $display("FAIL done not a single pulse"); end
    expect_out("after stop", {shr_x, shr_y, shl_a, shl_cd, swap, subt, 1'b0}, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
