// th24comp -- NCL threshold gate TH24comp: set function (A + B)*(C + D).
//
// With {A,B} the rails of one dual-rail variable and {C,D} those of
// another it is their completion detector: 1 once both carry data, 0 again
// once both are back at the spacer.
// Like every NCL gate it is a generalized-C element y = S | y & !R whose
// reset function R is "all inputs are 0" (the zero spacer), so once set the
// output stays 1 until every input has returned to 0. S and R never hold
// together, so the gate is a level-sensitive latch with enable S | R and
// data S; that latch is the gate's hysteresis and is intended.
//
// Interface: inputs a,b,c,d, output y, rst forces y to RESET_VALUE
// (asynchronous, active high, this design's own addition for start-up).
// No clock; the output follows its inputs with the gate's own delay.
module th24comp #(
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

  assign set_f   = (a | b) & (c | d);
  assign reset_f = ~(a | b | c | d);

  always_latch begin
    if (rst)          y = RESET_VALUE;
    else if (set_f)   y = 1'b1;
    else if (reset_f) y = 1'b0;
  end

endmodule
