// lsm_model: stand-in for a locally synchronous module in the testbenches.
// A DEPTH-stage pipeline clocked on the rising edge of clk; every stage adds
// one to the data word and carries a valid bit, so a word leaves the module
// DEPTH clock edges after it entered, increased by DEPTH. Outputs change
// CLK2Q_PS after the edge, well before the falling edge.
module lsm_model #(
  parameter int unsigned DEPTH    = 4,
  parameter int unsigned W        = 16,
  parameter int unsigned CLK2Q_PS = 200
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d_in,
  input  logic         v_in,
  output logic [W-1:0] d_out,
  output logic         v_out
);
  timeunit 1ps; timeprecision 1ps;

  logic [W-1:0] d [DEPTH];
  logic         v [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < DEPTH; k++) begin d[k] <= '0; v[k] <= 1'b0; end
    end else begin
      d[0] <= d_in + 1'b1;
      v[0] <= v_in;
      for (int k = 1; k < DEPTH; k++) begin
        d[k] <= d[k-1] + 1'b1;
        v[k] <= v[k-1];
      end
    end
  end

  assign #(CLK2Q_PS) d_out = d[DEPTH-1];
  assign #(CLK2Q_PS) v_out = v[DEPTH-1];
endmodule
