// c_element: generalised Muller C-element with asynchronous reset.
// The output rises when every input of `both` and every input of `plus` is
// high, falls when every input of `both` and every input of `minus` is low,
// and holds otherwise. With NP = NM = 1 and the plus/minus pins tied to their
// neutral values (plus = 1, minus = 0) it is the ordinary symmetric C-element;
// the asymmetric ("+"/"-" marked) C-elements of the clock arbiter use the
// plus/minus pins. It is a level-sensitive storage element (a latch), which is
// how a C-element is built; the latch warning tools give for it is intended.
module c_element #(
  parameter int unsigned NB = 1,   // inputs that act on both edges
  parameter int unsigned NP = 1,   // inputs that only gate the rising edge
  parameter int unsigned NM = 1    // inputs that only gate the falling edge
) (
  input  logic          rst_n,
  input  logic [NB-1:0] both,
  input  logic [NP-1:0] plus,
  input  logic [NM-1:0] minus,
  output logic          y
);
  timeunit 1ps; timeprecision 1ps;

  always_latch begin
    if (!rst_n)                  y = 1'b0;
    else if (&both && &plus)     y = 1'b1;
    else if (~|both && ~|minus)  y = 1'b0;
  end
endmodule
