// delay_element: behavioural model of the programmable delay element (DE) of
// a jitter generator. It is a delay line of NTAPS taps, TAP_PS picoseconds
// apart (an inverter chain in silicon), and a multiplexer that passes the tap
// chosen by `sel`: tap k delays `din` by k*TAP_PS. The delays are physical
// properties of the chain, hence the behavioural model; the multiplexer is
// plain logic. `last` is the end of the line: when it has switched, every tap
// agrees with the input, so it is the moment at which `sel` may change without
// a glitch on `dout`. Inputs must stay stable for longer than the line's full
// delay (NTAPS-1)*TAP_PS.
module delay_element #(
  parameter int unsigned NTAPS  = 8,
  parameter int unsigned TAP_PS = 250,
  localparam int unsigned SW = (NTAPS > 1) ? $clog2(NTAPS) : 1
) (
  input  logic          din,
  input  logic [SW-1:0] sel,
  output logic          dout,
  output logic          last
);
  timeunit 1ps; timeprecision 1ps;

  logic [NTAPS-1:0] tap;

  assign tap[0] = din;
  for (genvar k = 1; k < NTAPS; k++) begin : g_tap
    assign #(TAP_PS) tap[k] = tap[k-1];
  end

  assign dout = tap[sel];
  assign last = tap[NTAPS-1];
endmodule
