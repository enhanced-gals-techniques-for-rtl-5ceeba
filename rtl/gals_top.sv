// gals_top: a GALS datapath of N_BLOCKS wrapped blocks in a chain. Block 0
// takes the input stream (in_req/in_ack/in_data), block i hands its output to
// block i+1 with the four-phase bundled-data handshake, and the last block
// drives out_req/out_ack/out_data. All wrappers share one external clock,
// which may reach each block with any phase; each block has its own jitter
// generator with its own seed, so the blocks' clock pulses are spread apart
// in time. The locally synchronous modules (application logic) are outside:
// their clock, inputs and outputs are brought out as arrays indexed by block.
// Ten blocks follow the document's example of a synchronous circuit split
// into ten GALS blocks; the data width and the link delay are this design's
// choices. Data words are bundled with the requests: they are stable before
// the (delayed) request arrives and until the acknowledge returns.
module gals_top #(
  parameter int unsigned N_BLOCKS       = 10,
  parameter int unsigned DATA_W         = 16,
  parameter int unsigned TIMEOUT_CYCLES = 8,
  parameter int unsigned FLUSH_CYCLES   = 4,
  parameter int unsigned LINK_PS        = 1000   // handshake wire delay between blocks
) (
  input  logic              rst_n,
  input  logic              external_clock,
  input  logic              clk_select,
  input  logic              in_req,
  output logic              in_ack,
  input  logic [DATA_W-1:0] in_data,
  output logic              out_req,
  input  logic              out_ack,
  output logic [DATA_W-1:0] out_data,
  output logic              lsm_clk      [N_BLOCKS],
  output logic [DATA_W-1:0] lsm_data_in  [N_BLOCKS],
  output logic              lsm_valid_in [N_BLOCKS],
  input  logic [DATA_W-1:0] lsm_data_out [N_BLOCKS],
  input  logic              lsm_valid_out[N_BLOCKS]
);
  timeunit 1ps; timeprecision 1ps;

  logic              req [N_BLOCKS+1];
  logic              ack [N_BLOCKS+1];
  logic [DATA_W-1:0] data[N_BLOCKS+1];

  assign req[0]  = in_req;
  assign in_ack  = ack[0];
  assign data[0] = in_data;
  assign out_req = req[N_BLOCKS];
  assign ack[N_BLOCKS] = out_ack;
  assign out_data = data[N_BLOCKS];

  // Wrapper outputs; the handshake wires to the next block carry LINK_PS of
  // delay (a simulation model of the interconnect, ignored by synthesis).
  // They also set the width of each request-driven clock pulse, which lasts
  // one round trip of the handshake.
  logic w_req[N_BLOCKS];   // REQ_B of block i
  logic w_ack[N_BLOCKS];   // ACK_A of block i

  for (genvar i = 0; i < N_BLOCKS; i++) begin : g_link
    assign #(LINK_PS) req[i+1] = w_req[i];
    assign #(LINK_PS) ack[i]   = w_ack[i];
  end

  for (genvar i = 0; i < N_BLOCKS; i++) begin : g_blk
    gals_wrapper #(
      .DATA_W(DATA_W), .TIMEOUT_CYCLES(TIMEOUT_CYCLES), .FLUSH_CYCLES(FLUSH_CYCLES),
      .SEED(16'(16'hACE1 + 16'h03B5 * i))
    ) u_wrap (
      .rst_n(rst_n), .external_clock(external_clock), .clk_select(clk_select),
      .req_a(req[i]), .ack_a(w_ack[i]), .data_in(data[i]),
      .req_b(w_req[i]), .ack_b(ack[i+1]), .data_out(data[i+1]),
      .int_clk(lsm_clk[i]), .data_l(lsm_data_in[i]), .datav_in(lsm_valid_in[i]),
      .lsm_data_out(lsm_data_out[i]), .datav_out(lsm_valid_out[i])
    );
  end
endmodule
