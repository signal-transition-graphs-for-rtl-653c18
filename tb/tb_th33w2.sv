// tb_th33w2 -- self-checking testbench of the NCL gate th33w2.
//
// Drives random input vectors (one to all inputs change at a time) into
// two copies of the gate, one resetting to 0 and one to 1, and compares
// each output with a reference model written here: the output becomes 1
// when the set function A*(B + C) holds, 0 when all inputs are 0, and otherwise
// keeps its previous value. It checks the reset value too and counts how
// often the gate had to hold a 1 and a 0 (its hysteresis), failing if
// either never happened. A watchdog ends a hung run.
module tb_th33w2;

  localparam int unsigned N_STEPS = 4000;

  logic         rst;
  logic [2:0] v;
  logic         y_r0, y_r1;
  logic         ref0, ref1, s, r;
  int           checks, failures, n_hold1, n_hold0;

  th33w2                     dut0 (.rst, .a(v[0]), .b(v[1]), .c(v[2]), .y(y_r0));
  th33w2 #(.RESET_VALUE(1'b1)) dut1 (.rst, .a(v[0]), .b(v[1]), .c(v[2]), .y(y_r1));

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%0t %s: v=%b got %b expected %b", $time, what, v, got, exp);
    end
  endtask

  initial begin
    checks = 0; failures = 0; n_hold1 = 0; n_hold0 = 0;
    rst = 1'b1;
    v   = $urandom();
    #2;
    check("reset to 0", y_r0, 1'b0);
    check("reset to 1", y_r1, 1'b1);
    // Released with all inputs 0: the reset function then clears both.
    v = '0;
    #1 rst = 1'b0;
    ref0 = 1'b0;
    ref1 = 1'b0;
    for (int n = 0; n < N_STEPS; n++) begin
      #2;
      // bias toward all-zero vectors so that the reset function is hit
      if ($urandom_range(0, 5) == 0) v = '0;
      else                           v = v ^ (3)'($urandom_range(1, (1 << 3) - 1));
      #1;
      s = v[0] & (v[1] | v[2]);
      r = ~|v;
      if (!s && !r) begin
        if (ref0) n_hold1++; else n_hold0++;
      end
      ref0 = s ? 1'b1 : (r ? 1'b0 : ref0);
      ref1 = s ? 1'b1 : (r ? 1'b0 : ref1);
      check("gate (reset 0)", y_r0, ref0);
      check("gate (reset 1)", y_r1, ref1);
    end
    checks++;
    if (n_hold1 == 0 || n_hold0 == 0) begin
      failures++;
      $display("hysteresis not exercised: hold1=%0d hold0=%0d", n_hold1, n_hold0);
    end
    $display("hold1 %0d, hold0 %0d", n_hold1, n_hold0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(N_STEPS * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
