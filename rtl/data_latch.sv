// data_latch: the wrapper's input data latch. Transparent while DLE is high,
// it holds DATA_L otherwise. The input port opens it when a request arrives
// (the sender keeps DATA_IN stable while REQ_A is high, bundled-data
// convention) and closes it before the request-driven clock pulse, so the
// locally synchronous module samples a value that cannot change under it.
// Level-sensitive storage: the latch is intended.
module data_latch #(
  parameter int unsigned W = 16
) (
  input  logic         dle,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  timeunit 1ps; timeprecision 1ps;

  always_latch begin
    if (dle) q = d;
  end
endmodule
