// and2_cd -- dual-rail AND2 with embedded handshake built on a completion
// detector.
//
// The reference cell from which the SR-latch cell (and2_v1_srl) is derived.
// A 3-input C-element r signals "both operands arrived and the receiver is
// ready"; each output rail is a 2-input C-element of r and a plain gate
// that selects the value:
//
//   r   = C(a1|a0, b1|b0, Ay)
//   p   = a1 & b1,  y1 = C(p, r)
//   q   = a0 | b0,  y0 = C(q, r)
//   Aab = NOR(y0, y1)
//
// The inputs of r switch once per phase, but the C-element of the rail
// that does not fire sees r rise and fall without its own output moving
// (a "garbage" branch): correct under the 4-phase protocol, yet it makes
// the cell sensitive to the delay of the wire from r.
//
// Interface and timing as and2_v1: a, b, y are ncl_pkg::dr_t, ack_ab is
// Aab to the senders, ack_y is Ay from the receiver, no clock.
//
// The roles of r, p, q, y0 and y1 follow the design's description of this
// cell; the exact gates of p and q and the NOR acknowledgement are this
// code's own reading, as are the reset input and the assertion. The
// C-elements hold state in latches by construction.
module and2_cd
  import ncl_pkg::*;
(
  input  logic rst,
  input  dr_t  a,
  input  dr_t  b,
  output logic ack_ab,
  output dr_t  y,
  input  logic ack_y
);

  logic ca, cb, r, p, q;

  assign ca = a.d1 | a.d0;
  assign cb = b.d1 | b.d0;
  assign p  = a.d1 & b.d1;
  assign q  = a.d0 | b.d0;

  c_element #(.N(3)) u_r  (.rst, .x({ca, cb, ack_y}), .y(r));
  c_element #(.N(2)) u_y1 (.rst, .x({p, r}),          .y(y.d1));
  c_element #(.N(2)) u_y0 (.rst, .x({q, r}),          .y(y.d0));

  assign ack_ab = ~(y.d0 | y.d1);

  always_comb assert final (!dr_is_illegal(y));

endmodule
