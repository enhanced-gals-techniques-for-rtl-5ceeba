// gals_pkg: types shared by the wrapper controllers of the request-driven
// GALS wrapper. The two handshake controllers (input port, output port) are
// asynchronous state machines; their states are named here so that the
// testbenches can observe them by name. The encodings are this design's own
// choice.
package gals_pkg;
  timeunit 1ps; timeprecision 1ps;

  // Input port: idle -> wait for clock hold and output-port ready -> data
  // valid with the latch closed -> fire the request-driven clock pulse and
  // acknowledge -> back to idle on REQ_A-.
  typedef enum logic [1:0] {
    IP_IDLE  = 2'd0,
    IP_GRANT = 2'd1,
    IP_VALID = 2'd2,
    IP_PULSE = 2'd3
  } ip_state_t;

  // Output port: ready -> request downstream (clock stretched) -> wait for
  // the acknowledge to be released.
  typedef enum logic [1:0] {
    OP_READY = 2'd0,
    OP_SEND  = 2'd1,
    OP_WAIT  = 2'd2
  } op_state_t;
endpackage
