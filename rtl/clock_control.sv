// clock_control: clock control of the externally clocked / dual-mode GALS
// wrapper. It decides when the arbiter must stop the clock and which clock
// source is used:
//   STOPI   = not in time-out mode, or an input request holds the clock
//             (ACKI). The arbiter applies STOPI only in the clock's low phase.
//   clk_sel = clk_select, taken through a latch that is transparent only
//             while the wrapper is idle (time-out generator disarmed, no
//             input request, no output transfer), so the source changes only
//             when all switching activity has ceased.
//   ro_stop = stop the ring oscillator whenever it is not selected or the
//             wrapper does not need a local clock (time-out generator idle).
// The idle-only source change follows the document; the equations are this
// design's own. The select latch is intended.
module clock_control (
  input  logic rst_n,
  input  logic run,         // time-out mode from the time-out generator
  input  logic busy,        // time-out generator armed
  input  logic reqi,        // input port holds a request
  input  logic acki,        // arbiter: clock held for the input port
  input  logic stretch,     // output port transfer in progress
  input  logic clk_select,  // requested source: 0 external, 1 ring oscillator
  output logic stopi,
  output logic clk_sel,
  output logic ro_stop
);
  timeunit 1ps; timeprecision 1ps;

  logic idle;

  assign idle  = !busy && !reqi && !stretch;
  assign stopi = !run || acki;

  always_latch begin
    if (!rst_n)    clk_sel = clk_select;
    else if (idle) clk_sel = clk_select;
  end

  assign ro_stop = !busy || !clk_sel;
endmodule
