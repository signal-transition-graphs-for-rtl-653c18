// ncl_and_top -- a registerless handshake network of dual-rail AND2 cells.
//
// Two modules M1 and M2 each produce a dual-rail result and send it to a
// third module M3, which acknowledges both with one signal. Here all three
// are AND2 cells, so the network computes y = a & b & c & d. Control is
// purely local: every cell talks only to its neighbours through its
// data wires and its acknowledgement, and the cells are of different
// kinds to show that any cell obeying the 4-phase protocol fits:
//
//   M1 = and2_v2      (early evaluation)       a, b -> m1
//   M2 = and2_v1_srl  (SR-latch outputs)       c, d -> m2
//   M3 = and2_v1      (strong indication)      m1, m2 -> y
//
// The acknowledgement of M3 is forked to the Ay inputs of M1 and M2. The
// completion-detector cell and2_cd stands beside the network with its own
// operands e, f, result z and handshake, and so does a single TH23w2 gate
// (set function A + B*C), the gate whose protocols serve as the templates
// when a specification is mapped onto NCL gates; its pins are brought out
// so that it can be exercised under those protocols.
//
// Interface: all data ports are ncl_pkg::dr_t ({d1,d0}, 00 = spacer).
// ack_ab / ack_cd / ack_ef go to the senders (1 = send data, 0 = data
// taken); ack_y / ack_z come from the receivers with the same meaning.
// rst clears every state-holding gate to the spacer state. No clock.
//
// The shape of the network (two senders, one receiver acknowledging both)
// follows the design; which cell sits where is this design's own choice.
// Lint tools report circular logic through m2 and ack_m: the loop runs
// M3 -> ack_m -> SR latch of M2 -> m2 -> M3 and is the handshake itself,
// closed through state-holding gates; it is intended, as in any
// self-timed ring.
module ncl_and_top
  import ncl_pkg::*;
(
  input  logic rst,
  // 4-input AND network
  input  dr_t  a,
  input  dr_t  b,
  input  dr_t  c,
  input  dr_t  d,
  output logic ack_ab,
  output logic ack_cd,
  output dr_t  y,
  input  logic ack_y,
  // stand-alone completion-detector cell
  input  dr_t  e,
  input  dr_t  f,
  output logic ack_ef,
  output dr_t  z,
  input  logic ack_z,
  // stand-alone TH23w2 gate
  input  logic th_a,
  input  logic th_b,
  input  logic th_c,
  output logic th_y
);

  dr_t  m1, m2;
  logic ack_m;

  and2_v2 u_m1 (
    .rst, .a(a), .b(b), .ack_ab(ack_ab), .y(m1), .ack_y(ack_m)
  );

  and2_v1_srl u_m2 (
    .rst, .a(c), .b(d), .ack_ab(ack_cd), .y(m2), .ack_y(ack_m)
  );

  and2_v1 u_m3 (
    .rst, .a(m1), .b(m2), .ack_ab(ack_m), .y(y), .ack_y(ack_y)
  );

  and2_cd u_cd (
    .rst, .a(e), .b(f), .ack_ab(ack_ef), .y(z), .ack_y(ack_z)
  );

  th23w2 u_th23w2 (
    .rst, .a(th_a), .b(th_b), .c(th_c), .y(th_y)
  );

endmodule
