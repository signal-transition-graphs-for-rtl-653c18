// tb_and2_cd -- self-checking testbench of the dual-rail AND2 cell and2_cd.
//
// A dr_sender drives the operands a, b under the 4-phase protocol with
// random wire delays, and checks that Aab falls only after both operands
// arrived and rises only after both are spacer. A dr_receiver consumes y,
// checks it against a & b computed here from the token generator, and
// checks that y is stable until acknowledged. The testbench also counts
// early evaluation (y valid while an operand is still spacer): it must never happen in this strongly indicating cell.
// Every operand pair (00, 01, 10, 11) must occur. A watchdog ends a hung
// run with a failure.
module tb_and2_cd;
  import ncl_pkg::*;
  import tb_ncl_pkg::*;

  localparam int unsigned N_TOKENS = 400;
  localparam int unsigned SEED     = 7;

  logic         rst;
  dr_t  [1:0]   ab;
  logic         ack_ab, ack_y;
  dr_t          y;
  int           s_checks, s_fail, sent, r_checks, r_fail, ones, zeros, k;
  logic         s_done, r_done, exp_val;
  int           checks, failures;
  int           n_early, n_early_bad;
  int           n_pair[4];

  and2_cd dut (.rst, .a(ab[0]), .b(ab[1]), .ack_ab, .y, .ack_y);

  dr_sender #(.W(2), .SEED(SEED), .N_TOKENS(N_TOKENS)) u_snd (
    .rst, .data(ab), .ack(ack_ab), .checks(s_checks), .failures(s_fail),
    .sent, .done(s_done)
  );

  assign exp_val = token_bit(SEED, k, 0) & token_bit(SEED, k, 1);

  dr_receiver #(.N_TOKENS(N_TOKENS)) u_rcv (
    .rst, .y, .ack(ack_y), .k, .exp_val, .checks(r_checks), .failures(r_fail),
    .ones, .zeros, .done(r_done)
  );

  // Early evaluation: the result is out before both operands are.
  always @(y) if (!rst && dr_is_data(y) && !(dr_is_data(ab[0]) && dr_is_data(ab[1]))) begin
    n_early++;
    // Only a 0 operand can decide the result alone.
    if (y.d1 || !(ab[0].d0 || ab[1].d0)) n_early_bad++;
  end

  always @(posedge ack_y) if (!rst)
    n_pair[{token_bit(SEED, k, 1), token_bit(SEED, k, 0)}]++;

  task automatic finish(input string why);
    checks   = s_checks + r_checks;
    failures = s_fail + r_fail;
    checks++;
    if (n_early_bad != 0) begin
      failures++;
      $display("early evaluation without a 0 operand: %0d", n_early_bad);
    end
    checks++;
    if (0 ? (n_early == 0) : (n_early != 0)) begin
      failures++;
      $display("early evaluation count %0d does not match this cell", n_early);
    end
    foreach (n_pair[i]) begin
      checks++;
      if (n_pair[i] == 0) begin
        failures++;
        $display("operand pair %0d never occurred", i);
      end
    end
    checks++;
    if (why != "") begin
      failures++;
      $display("%s", why);
    end
    $display("tokens %0d, ones %0d, zeros %0d, early %0d", r_checks, ones, zeros, n_early);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    n_early = 0; n_early_bad = 0;
    foreach (n_pair[i]) n_pair[i] = 0;
    rst = 1'b1;
    #10 rst = 1'b0;
    checks++;
    wait (s_done && r_done);
    #20;
    finish("");
  end

  initial begin
    #(N_TOKENS * 200);
    finish("watchdog: handshake stalled");
  end

endmodule
