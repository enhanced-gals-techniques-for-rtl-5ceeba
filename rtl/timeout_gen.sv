// timeout_gen: time-out generator of the GALS wrapper. In request-driven
// operation the LSM is clocked only by incoming requests, so data still in
// its pipeline would never come out when the input stream pauses. Every
// incoming request (REQ_A1) arms this block and clears it. If no new request
// arrives for TIMEOUT_CYCLES cycles of the free-running source clock, it
// raises `run` (time-out mode: the wrapper lets the gated clock through to
// the LSM). It counts FLUSH_CYCLES rising edges of that gated clock, enough to
// empty the LSM pipeline, and then drops `run` again (STOP) and disarms.
// A new request at any time clears it at once; the arbiter makes the
// resulting clock stop glitch-free. The flush count lives in the gated clock
// domain; a toggle (epoch) from the source domain marks each new time-out, so
// the count needs no clear from the other domain. The gated clock only runs
// while `run` is high, so the toggle is stable whenever it is sampled. The document describes time-out mode
// (emptying pipeline stages with the external clock) but not this block's
// insides: counting source-clock cycles and gated-clock edges is this
// design's choice, as are the two counts.
module timeout_gen #(
  parameter int unsigned TIMEOUT_CYCLES = 8,
  parameter int unsigned FLUSH_CYCLES   = 4
) (
  input  logic rst_n,
  input  logic req_a1,    // a request is being received (clears and arms)
  input  logic src_clk,   // free-running selected clock source
  input  logic lclk,      // gated clock, counts the flush edges
  output logic run,       // time-out mode active (STOP when it falls)
  output logic busy       // armed: waiting for time-out or flushing
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned TW = $clog2(TIMEOUT_CYCLES + 1);
  localparam int unsigned FW = $clog2(FLUSH_CYCLES + 1);

  logic          armed, run_q, stop, clr_n, start;
  logic          epoch, seen_epoch;   // one toggle per time-out
  logic [TW-1:0] wait_cnt;
  logic [FW-1:0] flush_cnt;

  assign clr_n = rst_n && !req_a1;
  assign start = armed && !run_q && (wait_cnt == TW'(TIMEOUT_CYCLES - 1));

  // Wait phase and mode flag, in the source clock domain.
  always_ff @(posedge src_clk or negedge clr_n) begin
    if (!clr_n) begin
      armed    <= rst_n;      // a request arms the generator, reset disarms it
      run_q    <= 1'b0;
      wait_cnt <= '0;
    end else if (armed) begin
      if (!run_q) begin
        if (start) run_q <= 1'b1;
        wait_cnt <= wait_cnt + 1'b1;
      end else if (stop) begin
        run_q <= 1'b0;
        armed <= 1'b0;
      end
    end
  end

  always_ff @(posedge src_clk or negedge rst_n) begin
    if (!rst_n)     epoch <= 1'b0;
    else if (start) epoch <= ~epoch;
  end

  // Flush phase, in the gated clock domain: the first edge of a new time-out
  // (epoch changed) counts as one, later edges count up to FLUSH_CYCLES.
  always_ff @(posedge lclk or negedge rst_n) begin
    if (!rst_n) begin
      seen_epoch <= 1'b0;
      flush_cnt  <= '0;
    end else if (seen_epoch != epoch) begin
      seen_epoch <= epoch;
      flush_cnt  <= FW'(1);
    end else if (flush_cnt != FW'(FLUSH_CYCLES)) begin
      flush_cnt  <= flush_cnt + 1'b1;
    end
  end
  assign stop = (seen_epoch == epoch) && (flush_cnt == FW'(FLUSH_CYCLES));

  assign run  = run_q && !stop;
  assign busy = armed;
endmodule
