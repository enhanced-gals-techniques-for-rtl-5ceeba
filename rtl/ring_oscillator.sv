// ring_oscillator: behavioural model of the stoppable local ring oscillator
// of the dual-mode wrapper. In silicon it is a delay line closed into a ring
// through a gate that the stop input forces, so that the ring rests low; its
// frequency is set by the delay of the line and is not a logic property, so
// the line is modelled by a half-period delay. While `stop` is low, `rclk`
// toggles every HALF_PS picoseconds; when `stop` is high the ring is pulled
// low at the next half-period step and rests there until `stop` falls. The default half period gives about 87 MHz, the local-mode
// throughput measured for the ring-oscillator wrapper; the exact value is
// this model's choice.
module ring_oscillator #(
  parameter int unsigned HALF_PS = 5750   // half period in ps
) (
  input  logic rst_n,
  input  logic stop,
  output logic rclk
);
  timeunit 1ps; timeprecision 1ps;

  logic ring;

  initial ring = 1'b0;

  always begin
    #(HALF_PS);
    if (!rst_n || stop) ring = 1'b0;
    else                ring = ~ring;
  end

  assign rclk = ring;
endmodule
