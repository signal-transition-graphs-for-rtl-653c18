// and2_v1_srl -- strongly indicating dual-rail AND2 whose output rails are
// an SR latch built from two complex gates.
//
// Same function and handshake as and2_v1, with fewer gates. A single
// completion signal w decides when a result may be produced; the operand
// values only choose which arm of the latch is allowed to rise:
//
//   cd  = TH24comp(a1,a0,b1,b0)    (a1+a0)*(b1+b0): both operands arrived
//   w   = C(cd, Ay), x = !w        enable of the latch, active low
//   y0  = !(x | y1 | a1*b1)        0-arm, blocked when the result is 1
//   y1  = !(x | y0 | a0 | b0)      1-arm, blocked when the result is 0
//   Aab = NOR(y0, y1)
//
// While x = 1 both arms are 0 (spacer). When x falls the operands are
// stable, so exactly one arm rises and the other is held at 0 through the
// cross-coupling. x rises again only after both operands returned to the
// spacer and Ay fell, which clears the latch.
//
// Interface and timing as and2_v1: a, b, y are ncl_pkg::dr_t, ack_ab is
// Aab to the senders, ack_y is Ay from the receiver, no clock.
//
// Following the design: the completion detector followed by a C-element
// and the SR latch driven by its inverse. This design's own reading: the
// exact arm functions above (the design only states that data blocks the
// arm that must stay at 0), the reset input and the assertion. The
// combinational loop between y0 and y1 is the storage of the SR latch and
// is intended; it settles because x and the operands never enable both
// arms at once.
module and2_v1_srl
  import ncl_pkg::*;
(
  input  logic rst,
  input  dr_t  a,
  input  dr_t  b,
  output logic ack_ab,
  output dr_t  y,
  input  logic ack_y
);

  logic cd, w, x;

  th24comp u_cd (.rst, .a(a.d1), .b(a.d0), .c(b.d1), .d(b.d0), .y(cd));
  c_element #(.N(2)) u_w (.rst, .x({cd, ack_y}), .y(w));

  assign x = ~w;

  // Cross-coupled complex gates (the SR latch).
  assign y.d0 = ~(x | y.d1 | (a.d1 & b.d1));
  assign y.d1 = ~(x | y.d0 | a.d0 | b.d0);

  assign ack_ab = ~(y.d0 | y.d1);

  always_comb assert final (!dr_is_illegal(y));

endmodule
