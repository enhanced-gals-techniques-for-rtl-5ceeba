// jitter_generator: gives one GALS block its own random clock jitter. A
// pseudo noise generator chooses, for every clock pulse, one of NTAPS delays
// 0, TAP_PS, ..., (NTAPS-1)*TAP_PS of a programmable delay element, so each
// clock edge pair leaves delayed by a random amount while the pulse width is
// kept. The generator sits in front of the clock input of the locally
// synchronous module (placement "b": one generator per block, on the clock
// after the arbiter). The PN generator steps when the falling edge of a
// pulse reaches the end of the delay line: every tap then agrees, so the
// multiplexer cannot glitch, and both edges of one pulse see the same delay. Default
// spread 0..1.75 ns, close to the +/-1 ns jitter of the document's supply
// current study at a 20 ns clock. Each rising edge must be followed by a high
// phase and a low phase longer than the full line delay.
module jitter_generator #(
  parameter int unsigned NTAPS  = 8,
  parameter int unsigned TAP_PS = 250,
  parameter logic [15:0] SEED   = 16'hACE1
) (
  input  logic rst_n,
  input  logic clk_in,
  output logic clk_jit
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned SW = (NTAPS > 1) ? $clog2(NTAPS) : 1;

  logic [SW-1:0] pn;
  logic          line_end;

  pn_generator #(.W(16), .TAPS(16'hB400), .SEED(SEED), .OW(SW)) u_png (
    .rst_n  (rst_n),
    .trigger(~line_end),
    .pn     (pn)
  );

  delay_element #(.NTAPS(NTAPS), .TAP_PS(TAP_PS)) u_de (
    .din (clk_in),
    .sel (pn),
    .dout(clk_jit),
    .last(line_end)
  );
endmodule
