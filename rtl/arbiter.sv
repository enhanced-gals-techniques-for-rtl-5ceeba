// arbiter: clock arbiter of the externally clocked (and dual-mode) GALS
// wrapper. An external clock cannot be stopped at its source, so the wrapper
// gates it; this block makes every gate action happen only while the clock is
// low, so the clock CLK reaching the locally synchronous module never
// carries a runt pulse.
//
// Structure (three MUTEXes, three C-elements, an AND gate and two clock
// multiplexers, as in the document's arbiter figure):
//   MUX1  selects the clock source: external_clock (clk_select=0) or the
//         local ring oscillator rclk (clk_select=1).
//   M1    arbitrates the input port's request REQI against the clock. Its
//         grant ACKI can only be given while the clock is low, and while it
//         is held the clock is not passed on (clk1 stays low).
//   M2    arbitrates the stop request STOPI|stretch (OR2) against clk1. The
//         stop grant, inverted (INV1), is ste; the other grant is clk_grant,
//         the clock passed while no stop is granted.
//   C1    cout rises on ste+ once sti is low, falls on ste-.
//   M3    arbitrates cout against the clock: it grants only while the clock
//         is low, so the clock is released only in its low phase.
//   C2    sti rises when M3 grants (with cout high), falls after ste- once
//         M3 has let go.
//   C3    cg rises on sti+ while clk_grant is low, falls on sti-.
//   AND2  ECLK = clk_grant & cg.
//   MUX2  CLK = ECLK (clk_select=0) or LCLK, the ring branch's C-element of
//         the gated clock and rclk (clk_select=1). It takes the gated clock
//         (clk_grant & cg) rather than clk_grant alone, so that a release in
//         the ring's high phase cannot produce a short pulse either.
// Stop: STOPI or stretch rises -> (clock low) ste- -> cout- -> sti- -> cg-.
// Release: both low -> ste+ -> cout+ -> (clock low) sti+ -> cg+.
// The ring oscillator is stopped by ro_stop (driven by the clock control).
// The connections of M1's second input, of the C-elements' inputs and of the
// ring oscillator follow the document's description of the sequence; the
// exact pin assignment is this design's reading of it. Model delays are zero:
// the document's one-sided timing constraint (clock -> M2 -> clk_grant
// faster than stretch -> ste -> sti -> cg) is met trivially.
// The C-elements are latches and the MUTEX model is one; this is intended.
// The release path ste -> C1 -> M3 -> C2 -> C3 feeds sti back into C1, so
// lint tools report a combinational loop: it is the handshake's intended
// feedback through storage elements, not an oscillating path.
module arbiter #(
  parameter int unsigned RO_HALF_PS = 5750
) (
  input  logic rst_n,
  input  logic external_clock,
  input  logic clk_select,   // 0: external clock, 1: ring oscillator
  input  logic ro_stop,      // stops the ring oscillator
  input  logic reqi,         // input port asks for the clock to be held
  output logic acki,         // clock held low, input transfer may proceed
  input  logic stopi,        // clock control: stop the clock
  input  logic stretch,      // output port: stretch the clock (hold low)
  output logic src_clk,      // selected free-running source clock
  output logic clk           // gated clock towards the LSM (LCLK in the wrapper)
);
  timeunit 1ps; timeprecision 1ps;

  logic rclk, clk1, stop_req, stop_grant, ste, clk_grant;
  logic cout, m3_grant, sti, cg, eclk, lclk;
  logic unused_m3_g2;

  ring_oscillator #(.HALF_PS(RO_HALF_PS)) u_ro (
    .rst_n(rst_n), .stop(ro_stop), .rclk(rclk)
  );

  // MUX1
  assign src_clk = clk_select ? rclk : external_clock;

  // M1: input request against the clock
  mutex u_m1 (.rst_n(rst_n), .r1(reqi), .r2(src_clk), .g1(acki), .g2(clk1));

  // OR2, M2, INV1
  assign stop_req = stopi | stretch;
  mutex u_m2 (.rst_n(rst_n), .r1(stop_req), .r2(clk1), .g1(stop_grant), .g2(clk_grant));
  assign ste = ~stop_grant;

  // C1: both = ste, plus = ~sti
  c_element #(.NB(1), .NP(1), .NM(1)) u_c1 (
    .rst_n(rst_n), .both(ste), .plus(~sti), .minus(1'b0), .y(cout)
  );

  // M3: release only in the clock's low phase
  mutex u_m3 (.rst_n(rst_n), .r1(cout), .r2(src_clk), .g1(m3_grant), .g2(unused_m3_g2));

  // C2: both = M3 grant, plus = cout, minus = ste
  c_element #(.NB(1), .NP(1), .NM(1)) u_c2 (
    .rst_n(rst_n), .both(m3_grant), .plus(cout), .minus(ste), .y(sti)
  );

  // C3: both = sti, plus = ~clk_grant
  c_element #(.NB(1), .NP(1), .NM(1)) u_c3 (
    .rst_n(rst_n), .both(sti), .plus(~clk_grant), .minus(1'b0), .y(cg)
  );

  // AND2
  assign eclk = clk_grant & cg;

  // ring branch C-element
  c_element #(.NB(2), .NP(1), .NM(1)) u_cr (
    .rst_n(rst_n), .both({eclk, rclk}), .plus(1'b1), .minus(1'b0), .y(lclk)
  );

  // MUX2
  assign clk = clk_select ? lclk : eclk;
endmodule
