// gals_wrapper: request-driven asynchronous wrapper with external clock and
// blockwise clock jitter, around one locally synchronous module (LSM).
//
// The LSM is clocked by INT_CLK, the OR of two sources:
//  * REQ_INT, one pulse per incoming data token (request-driven mode). The
//    input port receives the four-phase handshake REQ_A/ACK_A, latches
//    DATA_IN into the data latch, makes the arbiter hold the clock (REQI/ACKI)
//    and fires the pulse with DATAV_IN high.
//  * LCLKM, the external clock (or, in dual mode, the local ring oscillator)
//    gated by the arbiter and delayed per pulse by this block's jitter
//    generator. It runs only in time-out mode: when no request has arrived
//    for TIMEOUT_CYCLES source clock cycles, the time-out generator lets
//    FLUSH_CYCLES clock edges through to empty the LSM pipeline.
// When the LSM shows valid output (DATAV_OUT) after a clock pulse, the output
// port stretches the clock (holds it low, so DATA_OUT is stable) and hands
// the data downstream with REQ_B/ACK_B. The arbiter only starts and stops the
// clock in its low phase. DATA_OUT is the LSM output itself.
// Interface: bundled data, four-phase handshakes on both sides; the LSM
// samples DATA_L and DATAV_IN on the rising edge of INT_CLK and must have
// DATA_OUT/DATAV_OUT settled before the falling edge.
// Timing assumptions: the jitter spread (NTAPS-1)*TAP_PS is shorter than a
// clock half period; the sender's data are stable while REQ_A is high.
// The block structure follows the document's wrapper diagram with the jitter
// generator in front of the LSM clock; the controllers' behaviour is this
// design's own.
module gals_wrapper #(
  parameter int unsigned  DATA_W         = 16,
  parameter int unsigned  TIMEOUT_CYCLES = 8,
  parameter int unsigned  FLUSH_CYCLES   = 4,
  parameter bit           JITTER         = 1'b1,
  parameter int unsigned  NTAPS          = 8,
  parameter int unsigned  TAP_PS         = 250,
  parameter logic [15:0]  SEED           = 16'hACE1,
  parameter int unsigned  RO_HALF_PS     = 5750
) (
  input  logic              rst_n,
  input  logic              external_clock,
  input  logic              clk_select,
  // upstream
  input  logic              req_a,
  output logic              ack_a,
  input  logic [DATA_W-1:0] data_in,
  // downstream
  output logic              req_b,
  input  logic              ack_b,
  output logic [DATA_W-1:0] data_out,
  // locally synchronous module
  output logic              int_clk,
  output logic [DATA_W-1:0] data_l,
  output logic              datav_in,
  input  logic [DATA_W-1:0] lsm_data_out,
  input  logic              datav_out
);
  timeunit 1ps; timeprecision 1ps;

  logic dle, req_int, reqi, acki, ack_int, req_a1;
  logic stretch, stopi, clk_sel, ro_stop, run, busy;
  logic src_clk, lclk, lclkm;

  data_latch #(.W(DATA_W)) u_latch (.dle(dle), .d(data_in), .q(data_l));

  input_port u_in (
    .rst_n(rst_n), .req_a(req_a), .ack_a(ack_a), .dle(dle),
    .datav_in(datav_in), .req_int(req_int), .reqi(reqi), .acki(acki),
    .ack_int(ack_int), .lclkm(lclkm), .req_a1(req_a1)
  );

  output_port u_out (
    .rst_n(rst_n), .int_clk(int_clk), .datav_out(datav_out),
    .req_b(req_b), .ack_b(ack_b), .stretch(stretch), .ack_int(ack_int)
  );

  timeout_gen #(.TIMEOUT_CYCLES(TIMEOUT_CYCLES), .FLUSH_CYCLES(FLUSH_CYCLES)) u_tog (
    .rst_n(rst_n), .req_a1(req_a1), .src_clk(src_clk), .lclk(lclk),
    .run(run), .busy(busy)
  );

  clock_control u_cc (
    .rst_n(rst_n), .run(run), .busy(busy), .reqi(reqi), .acki(acki),
    .stretch(stretch), .clk_select(clk_select), .stopi(stopi),
    .clk_sel(clk_sel), .ro_stop(ro_stop)
  );

  arbiter #(.RO_HALF_PS(RO_HALF_PS)) u_arb (
    .rst_n(rst_n), .external_clock(external_clock), .clk_select(clk_sel),
    .ro_stop(ro_stop), .reqi(reqi), .acki(acki), .stopi(stopi),
    .stretch(stretch), .src_clk(src_clk), .clk(lclk)
  );

  if (JITTER) begin : g_jit
    jitter_generator #(.NTAPS(NTAPS), .TAP_PS(TAP_PS), .SEED(SEED)) u_jg (
      .rst_n(rst_n), .clk_in(lclk), .clk_jit(lclkm)
    );
  end else begin : g_nojit
    assign lclkm = lclk;
  end

  // clock tree root: request-driven pulse or gated local clock
  assign int_clk  = req_int | lclkm;
  assign data_out = lsm_data_out;
endmodule
