// pn_generator: pseudo noise generator (PNG) of a jitter generator. A
// Fibonacci linear feedback shift register of W bits advances by one step on
// every rising edge of `trigger`, i.e. once per clock event it jitters, and
// `pn` presents its low OW bits as the next random delay choice. The default
// polynomial x^16 + x^14 + x^13 + x^11 + 1 is maximal (period 2^16 - 1). A
// plain LFSR is used because it runs at nearly the flip-flop toggle rate; its
// width, polynomial and seed are this design's choices. Reset loads SEED,
// which must not be zero.
module pn_generator #(
  parameter int unsigned     W    = 16,
  parameter logic [W-1:0]    TAPS = 16'hB400,   // feedback taps, bit i = x^(i+1)
  parameter logic [W-1:0]    SEED = 16'hACE1,
  parameter int unsigned     OW   = 3
) (
  input  logic          rst_n,
  input  logic          trigger,
  output logic [OW-1:0] pn
);
  timeunit 1ps; timeprecision 1ps;

  logic [W-1:0] lfsr;

  always_ff @(posedge trigger or negedge rst_n) begin
    if (!rst_n) lfsr <= SEED;
    else        lfsr <= {lfsr[W-2:0], ^(lfsr & TAPS)};
  end

  assign pn = lfsr[OW-1:0];

  initial assert (SEED != '0) else $error("pn_generator: zero seed locks the LFSR");
endmodule
