// output_port: output handshake controller of the GALS wrapper, an
// asynchronous state machine. A flag `fresh` says that a complete LSM clock
// pulse has ended (falling edge of INT_CLK, the LSM output has settled by
// then) since the last transfer. It is kept as three toggles: one flips on
// every rising edge, one on every falling edge, and one copies the
// falling-edge toggle when the pulse has been consumed: when its transfer
// completes, or at once when the pulse left no valid data. fresh is true when
// the first two agree (clock low after a full pulse) and the third lags.
// Every pulse is consumed before the next rising edge can come, so one bit
// per toggle is enough.
// If the LSM then presents valid data (DATAV_OUT), the port asks the arbiter
// to stretch the clock (hold it low, so DATA_OUT stays stable), keeps ACK_INT
// low so the input port fires no request-driven pulse, and sends a four-phase
// request REQ_B downstream:
//   OP_READY: ACK_INT high once the last pulse is consumed.
//             fresh & DATAV_OUT -> OP_SEND.
//   OP_SEND : stretch, REQ_B high. ACK_B+ -> OP_WAIT (fresh cleared).
//   OP_WAIT : stretch, REQ_B low. ACK_B- -> OP_READY (stretch released).
// The document gives the purpose (halt the clock at zero while outputting,
// since the downstream block may still be busy) but not the controller; the
// falling-edge flag and the states are this design's choice.
// The state latch and the consumption latch (sent_t, which reads `fresh`,
// which reads sent_t) are intended feedback through storage; lint tools
// report them as combinational loops.
module output_port
  import gals_pkg::*;
(
  input  logic rst_n,
  input  logic int_clk,
  input  logic datav_out,
  output logic req_b,
  input  logic ack_b,
  output logic stretch,
  output logic ack_int
);
  timeunit 1ps; timeprecision 1ps;

  op_state_t state;
  logic      rise_t, fall_t, sent_t, fresh;

  always_ff @(posedge int_clk or negedge rst_n) begin
    if (!rst_n) rise_t <= 1'b0;
    else        rise_t <= ~rise_t;
  end

  always_ff @(negedge int_clk or negedge rst_n) begin
    if (!rst_n) fall_t <= 1'b0;
    else        fall_t <= ~fall_t;
  end

  always_latch begin
    if (!rst_n)                 sent_t = 1'b0;
    else if (state == OP_WAIT || (state == OP_READY && fresh && !datav_out))
                                sent_t = fall_t;
  end

  assign fresh = (rise_t == fall_t) && (sent_t != fall_t);

  always_latch begin
    if (!rst_n) state = OP_READY;
    else begin
      unique case (state)
        OP_READY: if (fresh && datav_out) state = OP_SEND;
        OP_SEND : if (ack_b)              state = OP_WAIT;
        OP_WAIT : if (!ack_b)             state = OP_READY;
        default :                         state = OP_READY;
      endcase
    end
  end

  assign req_b   = (state == OP_SEND);
  assign stretch = (state != OP_READY);
  // Ready for a request-driven pulse only when every pulse so far has been
  // consumed (this also covers a local clock pulse still in flight).
  assign ack_int = (state == OP_READY) && (rise_t == sent_t);

  // The LSM must not be clocked while its output is being handed over.
  always @(posedge int_clk) if (rst_n) assert (!stretch) else $error("output_port: clock edge during output transfer");
endmodule
