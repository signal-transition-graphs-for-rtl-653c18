// tb_ncl_and_top -- end-to-end testbench of the AND2 handshake network.
//
// Three dr_sender models drive the operand pairs (a,b), (c,d) and (e,f)
// with random wire delays and check the acknowledgements that come back;
// two dr_receiver models consume y and z and check them against
// a&b&c&d and e&f, computed here from the token generator.
//
// Inside the network it checks the forked acknowledgement of M3 (it may
// fall only after both m1 and m2 carry data and rise only after both are
// spacer) and that the strongly indicating M3 never evaluates early. It
// counts every mechanism of the design and fails if one never occurred:
// early evaluation in M1, each arrival order of m1 and m2 at M3, both arms
// of the SR latch in M2, the garbage rise of r at each output rail of the
// completion-detector cell, the three operand scenarios of M1 (both 0,
// one 0, both 1), and both result values at y and z.
//
// The stand-alone TH23w2 gate (F = A + B*C) is driven through the two
// protocols under which such a gate may operate: full indication, whose
// branches are B+;B- and C+;C- (garbage: F must not move), A+;F+;A-;F- and
// (B+|C+);F+;(B-|C-);F-; and incomplete indication, where after A+ or
// B+,C+ the remaining inputs may still rise, in any order, concurrently
// with F+, and all inputs are reset before F-. F must rise exactly when a
// complete set of causes (A, or B and C) is present and fall only once all
// inputs are 0. The garbage, strong and weak branches are each counted.
// A watchdog ends a hung run. The top is used with its default parameters.
module tb_ncl_and_top;
  import ncl_pkg::*;
  import tb_ncl_pkg::*;

  localparam int unsigned N_TOKENS = 600;
  localparam int unsigned SEED_AB  = 11;
  localparam int unsigned SEED_CD  = 22;
  localparam int unsigned SEED_EF  = 33;

  typedef enum int {
    EV_EARLY_M1, EV_M1_FIRST, EV_M2_FIRST, EV_SRL_ONE, EV_SRL_ZERO,
    EV_GARBAGE_Y1, EV_GARBAGE_Y0, EV_SC_00, EV_SC_01, EV_SC_11,
    EV_Y_ONE, EV_Y_ZERO, EV_Z_ONE, EV_Z_ZERO,
    EV_TH_GARBAGE, EV_TH_STRONG, EV_TH_WEAK, EV_N
  } event_e;

  logic       rst;
  dr_t  [1:0] ab, cd, ef;
  dr_t        y, z;
  logic       ack_ab, ack_cd, ack_ef, ack_y, ack_z;
  logic       exp_y, exp_z;
  int         k_y, k_z;
  int         c_ab, f_ab, c_cd, f_cd, c_ef, f_ef, c_y, f_y, c_z, f_z;
  int         n_ab, n_cd, n_ef, ones_y, zeros_y, ones_z, zeros_z;
  logic       d_ab, d_cd, d_ef, d_y, d_z;
  int         checks, failures;
  int         n_ev[EV_N];
  logic       th_a, th_b, th_c, th_y;
  logic       d_th;

  ncl_and_top dut (
    .rst,
    .a(ab[0]), .b(ab[1]), .c(cd[0]), .d(cd[1]),
    .ack_ab, .ack_cd, .y, .ack_y,
    .e(ef[0]), .f(ef[1]), .ack_ef, .z, .ack_z,
    .th_a, .th_b, .th_c, .th_y
  );

  dr_sender #(.W(2), .SEED(SEED_AB), .N_TOKENS(N_TOKENS)) u_snd_ab (
    .rst, .data(ab), .ack(ack_ab), .checks(c_ab), .failures(f_ab), .sent(n_ab), .done(d_ab));
  dr_sender #(.W(2), .SEED(SEED_CD), .N_TOKENS(N_TOKENS)) u_snd_cd (
    .rst, .data(cd), .ack(ack_cd), .checks(c_cd), .failures(f_cd), .sent(n_cd), .done(d_cd));
  dr_sender #(.W(2), .SEED(SEED_EF), .N_TOKENS(N_TOKENS)) u_snd_ef (
    .rst, .data(ef), .ack(ack_ef), .checks(c_ef), .failures(f_ef), .sent(n_ef), .done(d_ef));

  assign exp_y = token_bit(SEED_AB, k_y, 0) & token_bit(SEED_AB, k_y, 1) &
                 token_bit(SEED_CD, k_y, 0) & token_bit(SEED_CD, k_y, 1);
  assign exp_z = token_bit(SEED_EF, k_z, 0) & token_bit(SEED_EF, k_z, 1);

  dr_receiver #(.N_TOKENS(N_TOKENS)) u_rcv_y (
    .rst, .y, .ack(ack_y), .k(k_y), .exp_val(exp_y), .checks(c_y), .failures(f_y),
    .ones(ones_y), .zeros(zeros_y), .done(d_y));
  dr_receiver #(.N_TOKENS(N_TOKENS)) u_rcv_z (
    .rst, .y(z), .ack(ack_z), .k(k_z), .exp_val(exp_z), .checks(c_z), .failures(f_z),
    .ones(ones_z), .zeros(zeros_z), .done(d_z));

  // ---- internal checks and mechanism counters ----
  int   int_checks, int_failures;
  dr_t  m1, m2;
  logic ack_m;

  assign m1    = dut.m1;
  assign m2    = dut.m2;
  assign ack_m = dut.ack_m;

  // M3 acknowledges both M1 and M2 with one forked signal.
  always @(negedge ack_m) if (!rst) begin
    int_checks++;
    if (!(dr_is_data(m1) && dr_is_data(m2))) begin
      int_failures++;
      $display("%0t M3 acknowledged before both operands arrived", $time);
    end
  end
  always @(posedge ack_m) if (!rst) begin
    int_checks++;
    if (!(dr_is_spacer(m1) && dr_is_spacer(m2))) begin
      int_failures++;
      $display("%0t M3 released before both operands were spacer", $time);
    end
  end

  // M3 is strongly indicating: its result never precedes an operand.
  always @(y) if (!rst && dr_is_data(y)) begin
    int_checks++;
    if (!(dr_is_data(m1) && dr_is_data(m2))) begin
      int_failures++;
      $display("%0t M3 produced y before both operands", $time);
    end
  end

  // Early evaluation in M1 (weakly indicating cell).
  always @(m1) if (!rst && dr_is_data(m1) && !(dr_is_data(ab[0]) && dr_is_data(ab[1])))
    n_ev[EV_EARLY_M1]++;

  // Arrival order at M3.
  always @(m1) if (!rst && dr_is_data(m1) && dr_is_spacer(m2)) n_ev[EV_M1_FIRST]++;
  always @(m2) if (!rst && dr_is_data(m2) && dr_is_spacer(m1)) n_ev[EV_M2_FIRST]++;

  // Both arms of the SR latch in M2.
  always @(posedge m2.d1) if (!rst) n_ev[EV_SRL_ONE]++;
  always @(posedge m2.d0) if (!rst) n_ev[EV_SRL_ZERO]++;

  // Garbage: r rises at a C-element whose other input stays 0.
  always @(posedge dut.u_cd.r) if (!rst) begin
    if (!dut.u_cd.p) n_ev[EV_GARBAGE_Y1]++;
    if (!dut.u_cd.q) n_ev[EV_GARBAGE_Y0]++;
  end

  // Operand scenarios of M1, counted once per token when M1 acknowledges.
  always @(negedge ack_ab) if (!rst) begin
    case ({ab[0].d1, ab[1].d1})
      2'b00:        n_ev[EV_SC_00]++;
      2'b01, 2'b10: n_ev[EV_SC_01]++;
      default:      n_ev[EV_SC_11]++;
    endcase
  end

  // ---- TH23w2 under its protocols ----
  localparam int unsigned N_TH = 600;
  int th_checks, th_failures;

  task automatic th_expect(input logic exp, input string what);
    th_checks++;
    if (th_y !== exp) begin
      th_failures++;
      $display("%0t TH23w2 %s: a=%b b=%b c=%b F=%b", $time, what, th_a, th_b, th_c, th_y);
    end
  endtask

  // Raise one input; F must be 1 exactly when a set of causes is complete.
  task automatic th_rise(input int which);
    #($urandom_range(1, 4));
    case (which)
      0: th_a = 1'b1;
      1: th_b = 1'b1;
      default: th_c = 1'b1;
    endcase
    #1 th_expect(th_a | (th_b & th_c), "data phase");
  endtask

  // Reset all raised inputs in random order; F holds until all are 0.
  task automatic th_spacer();
    int order[3] = '{0, 1, 2};
    order.shuffle();
    foreach (order[j]) begin
      #($urandom_range(1, 4));
      case (order[j])
        0: th_a = 1'b0;
        1: th_b = 1'b0;
        default: th_c = 1'b0;
      endcase
      #1 th_expect((th_a | th_b | th_c) ? th_y : 1'b0, "spacer phase");
    end
    th_expect(1'b0, "after spacer");
  endtask

  initial begin
    th_a = 1'b0; th_b = 1'b0; th_c = 1'b0;
    th_checks = 0; th_failures = 0; d_th = 1'b0;
    wait (!rst);
    for (int n = 0; n < N_TH; n++) begin
      case ($urandom_range(0, 9))
        // full indication
        0: begin th_rise(1); th_spacer(); n_ev[EV_TH_GARBAGE]++; end           // B+;B-
        1: begin th_rise(2); th_spacer(); n_ev[EV_TH_GARBAGE]++; end           // C+;C-
        2: begin th_rise(0); th_spacer(); n_ev[EV_TH_STRONG]++; end            // A+;F+;A-;F-
        3: begin                                                               // (B+|C+);F+;...
             if ($urandom_range(0, 1) != 0) begin th_rise(1); th_rise(2); end
             else                           begin th_rise(2); th_rise(1); end
             th_spacer(); n_ev[EV_TH_STRONG]++;
           end
        // incomplete indication: the other inputs arrive around F+
        4: begin th_rise(0); th_rise(1); th_rise(2); th_spacer(); n_ev[EV_TH_WEAK]++; end
        5: begin th_rise(0); th_rise(2); th_rise(1); th_spacer(); n_ev[EV_TH_WEAK]++; end
        6: begin th_rise(1); th_rise(0); th_rise(2); th_spacer(); n_ev[EV_TH_WEAK]++; end
        7: begin th_rise(1); th_rise(2); th_rise(0); th_spacer(); n_ev[EV_TH_WEAK]++; end
        8: begin th_rise(2); th_rise(0); th_rise(1); th_spacer(); n_ev[EV_TH_WEAK]++; end
        default: begin th_rise(2); th_rise(1); th_rise(0); th_spacer(); n_ev[EV_TH_WEAK]++; end
      endcase
    end
    d_th = 1'b1;
  end

  task automatic finish(input string why);
    n_ev[EV_Y_ONE]  = ones_y;
    n_ev[EV_Y_ZERO] = zeros_y;
    n_ev[EV_Z_ONE]  = ones_z;
    n_ev[EV_Z_ZERO] = zeros_z;
    checks   = c_ab + c_cd + c_ef + c_y + c_z + int_checks + th_checks;
    failures = f_ab + f_cd + f_ef + f_y + f_z + int_failures + th_failures;
    for (int i = 0; i < EV_N; i++) begin
      event_e e;
      e = event_e'(i);
      checks++;
      $display("%-14s %0d", e.name(), n_ev[i]);
      if (n_ev[i] == 0) begin
        failures++;
        $display("mechanism %s never occurred", e.name());
      end
    end
    checks++;
    if (why != "") begin
      failures++;
      $display("%s", why);
    end
    $display("tokens y %0d, z %0d", c_y, c_z);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    int_checks = 0; int_failures = 0;
    foreach (n_ev[i]) n_ev[i] = 0;
    rst = 1'b1;
    #10 rst = 1'b0;
    wait (d_ab && d_cd && d_ef && d_y && d_z && d_th);
    #20;
    finish("");
  end

  initial begin
    #(N_TOKENS * 400);
    finish("watchdog: handshake stalled");
  end

endmodule
