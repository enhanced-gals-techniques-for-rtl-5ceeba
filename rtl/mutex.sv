// mutex: behavioural model of a two-way mutual exclusion element (MUTEX).
// A silicon MUTEX is a cross-coupled latch followed by an analog
// metastability filter; the filter has no logic equivalent, so this file is a
// behavioural model with the real cell's ports. Grant g1 follows request r1
// and g2 follows r2, but never both at once: a grant is only given while the
// other grant is low, and a granted request keeps its grant until it is
// withdrawn, after which a waiting request is granted. When both requests
// arrive in the same instant, r1 wins (a real cell resolves the tie after a
// bounded-in-probability metastable interval). Grants respond with zero delay.
// The two grant latches read each other (cross-coupling), which lint tools
// report as a combinational loop; that is how the element works.
module mutex (
  input  logic rst_n,
  input  logic r1,
  input  logic r2,
  output logic g1,
  output logic g2
);
  timeunit 1ps; timeprecision 1ps;

  logic g1_q, g2_q;

  always_latch begin
    if (!rst_n) begin
      g1_q = 1'b0;
      g2_q = 1'b0;
    end else begin
      if (!r1)                    g1_q = 1'b0;
      else if (!g2_q)             g1_q = 1'b1;
      if (!r2)                    g2_q = 1'b0;
      else if (!g1_q && !r1)      g2_q = 1'b1;
    end
  end

  assign g1 = g1_q;
  assign g2 = g2_q;

  // The element exists to keep the two grants apart.
  always_comb assert (!(g1_q && g2_q)) else $error("mutex: both grants high");
endmodule
