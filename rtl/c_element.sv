// c_element -- N-input Muller C-element (the NCL gate THnn).
//
// The output rises when every input is 1, falls when every input is 0 and
// otherwise keeps its value. It is the generalized-C element y = S | y & !R
// with set S = AND of the inputs and reset R = NOR of the inputs, which is
// how the design defines its state-holding gates.
//
// Interface: x[N-1:0] inputs, y output, rst forces y to RESET_VALUE
// (asynchronous, active high). There is no clock: the state is held by a
// level-sensitive latch whose enable is S | R and whose data is S. The latch
// is intended; it is the storage of the C-element. The reset input and the
// RESET_VALUE parameter are this design's own addition so that a circuit
// built from these gates starts in a known state.
module c_element #(
  parameter int unsigned N           = 2,
  parameter bit          RESET_VALUE = 1'b0
) (
  input  logic         rst,
  input  logic [N-1:0] x,
  output logic         y
);

  logic set_f, reset_f;

  assign set_f   = &x;
  assign reset_f = ~|x;

  always_latch begin
    if (rst)          y = RESET_VALUE;
    else if (set_f)   y = 1'b1;
    else if (reset_f) y = 1'b0;
  end

endmodule
