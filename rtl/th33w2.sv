// th33w2 -- NCL threshold gate TH33w2: set function A*(B + C).
//
// Threshold 3 over three inputs with A weighted 2. In the early-evaluating
// AND2 cell it produces the false rail y0 = Ay*(a0 + b0) as soon as either
// operand is 0 and the receiver is ready.
// Like every NCL gate it is a generalized-C element y = S | y & !R whose
// reset function R is "all inputs are 0" (the zero spacer), so once set the
// output stays 1 until every input has returned to 0. S and R never hold
// together, so the gate is a level-sensitive latch with enable S | R and
// data S; that latch is the gate's hysteresis and is intended.
//
// Interface: inputs a,b,c, output y, rst forces y to RESET_VALUE
// (asynchronous, active high, this design's own addition for start-up).
// No clock; the output follows its inputs with the gate's own delay.
module th33w2 #(
  parameter bit RESET_VALUE = 1'b0
) (
  input  logic rst,
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  logic set_f, reset_f;

  assign set_f   = a & (b | c);
  assign reset_f = ~(a | b | c);

  always_latch begin
    if (rst)          y = RESET_VALUE;
    else if (set_f)   y = 1'b1;
    else if (reset_f) y = 1'b0;
  end

endmodule
