// and2_v1 -- strongly indicating dual-rail AND2 with embedded handshake.
//
// y = a & b on dual-rail wires under the 4-phase protocol, with the input
// acknowledgement built into the cell, so cells connect to each other
// without registers. Every gate waits for all of its causes (strong, or
// AND, causality), so the result appears only after both operands arrived.
//
//   x   = THand0(a0,a1,b0,b1)   set a0*b0 + a0*b1 + a1*b0  (operands say 0)
//   y0  = C(x, Ay)              false rail of the result
//   y1  = C(a1, b1, Ay)         true rail of the result
//   Aab = NOR(y0, y1)           input acknowledgement
//
// Interface: a, b, y are ncl_pkg::dr_t ({d1,d0}, 00 = spacer). ack_ab (Aab)
// goes to the senders of a and b: 1 asks for data, 0 says both were used.
// ack_y (Ay) comes from the receiver of y with the same meaning.
// Timing, one token: Ay=1 and a, b valid -> y valid -> Aab falls; then
// Ay=0 and a, b back to spacer -> y spacer -> Aab rises. No clock; every
// delay may be arbitrary.
//
// The gate netlist is the one derived in the design for variant 1. The
// name THand0 for the gate of x, the reset input and the assertion are
// this code's own. The C-elements and THand0 hold state in latches by
// construction (see c_element).
module and2_v1
  import ncl_pkg::*;
(
  input  logic rst,
  input  dr_t  a,
  input  dr_t  b,
  output logic ack_ab,
  output dr_t  y,
  input  logic ack_y
);

  logic x;

  th_and0 u_x (
    .rst, .a(b.d0), .b(a.d0), .c(b.d1), .d(a.d1), .y(x)
  );

  c_element #(.N(2)) u_y0 (.rst, .x({x, ack_y}),          .y(y.d0));
  c_element #(.N(3)) u_y1 (.rst, .x({a.d1, b.d1, ack_y}), .y(y.d1));

  assign ack_ab = ~(y.d0 | y.d1);

  // The result is never both 0 and 1.
  always_comb assert final (!dr_is_illegal(y));

endmodule
