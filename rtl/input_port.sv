// input_port: input handshake controller of the GALS wrapper, an
// asynchronous state machine (no clock; every state change is caused by an
// input change). It receives a four-phase bundled-data request REQ_A/ACK_A
// and turns it into one request-driven clock pulse REQ_INT for the locally
// synchronous module (LSM):
//   IP_IDLE : wait for REQ_A+.
//   IP_GRANT: open the data latch (DLE), ask the arbiter to hold the clock
//             (REQI) and tell the time-out generator a request is in (REQ_A1,
//             which also clears it). Leave when the arbiter grants ACKI (clock
//             held low), the output port is ready (ACK_INT) and the delayed
//             local clock LCLKM at the LSM is low (a pulse that passed the
//             arbiter before the grant may still be in the jitter delay line).
//   IP_VALID: latch closed, DATAV_IN high; moves on by itself, so that
//             DATAV_IN is set up before the clock edge.
//   IP_PULSE: DATAV_IN and REQ_INT high (the LSM clock edge), ACK_A high.
//             On REQ_A- all fall and the controller is idle.
// The state sequence, the latch opening on REQ_A+ and the use of ACK_INT as
// "output port ready" are this design's reading of the wrapper's block
// diagram; the document names the block but does not give its specification.
// The state register is a latch loop, as in any asynchronous state machine;
// lint tools report it as a combinational loop, which is intended.
module input_port
  import gals_pkg::*;
(
  input  logic rst_n,
  input  logic req_a,
  output logic ack_a,
  output logic dle,
  output logic datav_in,
  output logic req_int,
  output logic reqi,
  input  logic acki,
  input  logic ack_int,
  input  logic lclkm,
  output logic req_a1
);
  timeunit 1ps; timeprecision 1ps;

  ip_state_t state;

  always_latch begin
    if (!rst_n) state = IP_IDLE;
    else begin
      unique case (state)
        IP_IDLE : if (req_a)            state = IP_GRANT;
        IP_GRANT: if (acki && ack_int && !lclkm) state = IP_VALID;
        IP_VALID:                       state = IP_PULSE;
        IP_PULSE: if (!req_a)           state = IP_IDLE;
      endcase
    end
  end

  assign dle      = (state == IP_GRANT);
  assign reqi     = (state != IP_IDLE);
  assign req_a1   = reqi;
  assign datav_in = (state == IP_VALID) || (state == IP_PULSE);
  assign req_int  = (state == IP_PULSE);
  assign ack_a    = (state == IP_PULSE);

  // Four-phase rule: no new request while acknowledged, nor withdrawn early.
  always @(posedge req_int) if (rst_n) assert (acki) else $error("input_port: pulse without clock hold");
endmodule
