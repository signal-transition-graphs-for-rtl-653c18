// th_and0 -- NCL threshold gate THand0: set function A*B + B*C + A*D.
//
// With A=b0, B=a0, C=b1, D=a1 it computes x = a0*b0 + a0*b1 + a1*b0,
// the false rail of a dual-rail AND before the receiver's acknowledgement is
// joined in (signal x of the strongly indicating AND2 cell).
// Like every NCL gate it is a generalized-C element y = S | y & !R whose
// reset function R is "all inputs are 0" (the zero spacer), so once set the
// output stays 1 until every input has returned to 0. S and R never hold
// together, so the gate is a level-sensitive latch with enable S | R and
// data S; that latch is the gate's hysteresis and is intended.
//
// Interface: inputs a,b,c,d, output y, rst forces y to RESET_VALUE
// (asynchronous, active high, this design's own addition for start-up).
// No clock; the output follows its inputs with the gate's own delay.
module th_and0 #(
  parameter bit RESET_VALUE = 1'b0
) (
  input  logic rst,
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic y
);

  logic set_f, reset_f;

  assign set_f   = (a & b) | (b & c) | (a & d);
  assign reset_f = ~(a | b | c | d);

  always_latch begin
    if (rst)          y = RESET_VALUE;
    else if (set_f)   y = 1'b1;
    else if (reset_f) y = 1'b0;
  end

endmodule
