// and2_v2 -- weakly indicating dual-rail AND2 with early evaluation.
//
// A 0 on either operand decides the result, so the false rail of y may
// rise as soon as one operand is 0 and the receiver is ready, without
// waiting for the other operand (weak, or OR, causality). That shortens
// the forward latency. The input acknowledgement, however, must still wait
// for both operands, or the sender of the late one could change it while
// this cell has not seen it; Aab therefore watches the operands directly.
//
//   y0  = TH33w2(Ay; a0, b0)       Ay*(a0 + b0), early evaluation
//   y1  = C(a1, b1, Ay)            needs both operands
//   na  = NOR(a1, a0), nb = NOR(b1, b0), ny = NOR(y1, y0)
//   Aab = C(na, nb, ny)            falls when both operands and the result
//                                  are data, rises when all are spacer
//
// Interface and timing as and2_v1: a, b, y are ncl_pkg::dr_t, ack_ab is
// Aab to the senders, ack_y is Ay from the receiver, no clock. One token:
// y may become valid after Ay and a single 0 operand; Aab falls only after
// both operands and y are valid; y returns to spacer after Ay and both
// operands did; Aab then rises.
//
// The gate netlist is the one derived in the design for variant 2. The
// reset input (Aab resets to 1, "ready") and the assertion are this
// code's own. The NCL gates hold state in latches by construction.
module and2_v2
  import ncl_pkg::*;
(
  input  logic rst,
  input  dr_t  a,
  input  dr_t  b,
  output logic ack_ab,
  output dr_t  y,
  input  logic ack_y
);

  logic na, nb, ny;

  th33w2 u_y0 (.rst, .a(ack_y), .b(a.d0), .c(b.d0), .y(y.d0));
  c_element #(.N(3)) u_y1 (.rst, .x({a.d1, b.d1, ack_y}), .y(y.d1));

  assign na = ~(a.d1 | a.d0);
  assign nb = ~(b.d1 | b.d0);
  assign ny = ~(y.d1 | y.d0);

  c_element #(.N(3), .RESET_VALUE(1'b1)) u_ack (.rst, .x({na, nb, ny}), .y(ack_ab));

  always_comb assert final (!dr_is_illegal(y));

endmodule
