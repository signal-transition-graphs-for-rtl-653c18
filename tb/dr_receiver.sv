// dr_receiver -- environment model: the receiver side of a dual-rail
// 4-phase handshake over one dual-rail wire.
//
// It holds ack = 1 (ready), waits for y to carry data, compares it with
// exp_val (the value the testbench expects for token k), waits a random
// time, drops ack, waits for the spacer, waits again and raises ack.
//
// It also checks the cell's output protocol: y may become data only while
// ack = 1, must keep its value until ack falls, and may return to the
// spacer only while ack = 0 (output persistence seen from outside).
module dr_receiver
  import ncl_pkg::*;
#(
  parameter int unsigned N_TOKENS = 100
) (
  input  logic rst,
  input  dr_t  y,
  output logic ack,
  output int   k,
  input  logic exp_val,
  output int   checks,
  output int   failures,
  output int   ones,
  output int   zeros,
  output logic done
);

  dr_t prev;

  initial begin
    ack      = 1'b0;
    k        = 0;
    checks   = 0;
    failures = 0;
    ones     = 0;
    zeros    = 0;
    done     = 1'b0;
    wait (!rst);
    #($urandom_range(1, 5));
    ack = 1'b1;
    for (int unsigned n = 0; n < N_TOKENS; n++) begin
      wait (y.d1 || y.d0);
      checks++;
      if (y != dr_encode(exp_val)) begin
        failures++;
        $display("%0t dr_receiver: token %0d got %b, expected %b", $time, k, y, exp_val);
      end
      if (y.d1) ones++; else zeros++;
      #($urandom_range(1, 8));
      ack = 1'b0;
      wait (!(y.d1 || y.d0));
      #($urandom_range(1, 8));
      k++;
      ack = 1'b1;
    end
    done = 1'b1;
  end

  always @(y) begin
    if (!rst) begin
      if (dr_is_illegal(y)) begin
        failures++;
        $display("%0t dr_receiver: illegal code 11", $time);
      end else if (dr_is_spacer(prev) && dr_is_data(y) && !ack) begin
        failures++;
        $display("%0t dr_receiver: data while ack = 0", $time);
      end else if (dr_is_data(prev) && y != prev && ack) begin
        failures++;
        $display("%0t dr_receiver: output changed while ack = 1", $time);
      end
    end
    prev = y;
  end

endmodule
