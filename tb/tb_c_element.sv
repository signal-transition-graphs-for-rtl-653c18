// tb_c_element -- self-checking testbench of the N-input C-element.
//
// Three copies (N = 2 and N = 3 resetting to 0, N = 4 resetting to 1) see
// random input vectors. Each output is compared with a reference model
// written here: 1 once all of its inputs are 1, 0 once all are 0, else
// unchanged. The reset values are checked, and the testbench fails if the
// holding of a 1 and of a 0 (the hysteresis) was never exercised. A
// watchdog ends a hung run.
module tb_c_element;

  localparam int unsigned N_STEPS = 4000;

  logic       rst;
  logic [3:0] v;
  logic       y2, y3, y4;
  logic       r2, r3, r4;
  int         checks, failures, n_hold1, n_hold0;

  c_element #(.N(2))                     dut2 (.rst, .x(v[1:0]), .y(y2));
  c_element #(.N(3))                     dut3 (.rst, .x(v[2:0]), .y(y3));
  c_element #(.N(4), .RESET_VALUE(1'b1)) dut4 (.rst, .x(v),      .y(y4));

  function automatic logic c_next(input logic [3:0] x, input int n, input logic q);
    logic all1, all0;
    all1 = 1'b1;
    all0 = 1'b1;
    for (int i = 0; i < n; i++) begin
      all1 = all1 & x[i];
      all0 = all0 & ~x[i];
    end
    return all1 ? 1'b1 : (all0 ? 1'b0 : q);
  endfunction

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
    v   = 4'b1111;
    #2;
    check("N=2 reset", y2, 1'b0);
    check("N=3 reset", y3, 1'b0);
    check("N=4 reset", y4, 1'b1);
    v = 4'b0101;
    #1 rst = 1'b0;
    r2 = 1'b0; r3 = 1'b0; r4 = 1'b1;
    for (int n = 0; n < N_STEPS; n++) begin
      #2;
      case ($urandom_range(0, 7))
        0:       v = '0;
        1:       v = '1;
        default: v = v ^ 4'($urandom_range(1, 15));
      endcase
      #1;
      if (v[2:0] != '0 && v[2:0] != '1) begin
        if (r3) n_hold1++; else n_hold0++;
      end
      r2 = c_next(v, 2, r2);
      r3 = c_next(v, 3, r3);
      r4 = c_next(v, 4, r4);
      check("N=2", y2, r2);
      check("N=3", y3, r3);
      check("N=4", y4, r4);
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
