// dr_sender -- environment model: the sender side of a dual-rail 4-phase
// handshake over W dual-rail wires.
//
// For token k it waits for ack = 1, then drives every wire to the code of
// token_bit(SEED, k, i), one wire at a time in random order with random
// gaps (sometimes one wire is held back for LATE time units, so a cell
// that can evaluate early gets the chance). It then waits for ack = 0 and
// returns the wires to the spacer, again in random order.
//
// It checks the receiving cell's acknowledgement: ack may fall only once
// every wire carries data, and rise only once every wire is back at the
// spacer (the cell must indicate all of its inputs). Counts are outputs.
module dr_sender
  import ncl_pkg::*;
  import tb_ncl_pkg::*;
#(
  parameter int unsigned W        = 2,
  parameter int unsigned SEED     = 1,
  parameter int unsigned N_TOKENS = 100,
  parameter int unsigned LATE     = 40
) (
  input  logic         rst,
  output dr_t  [W-1:0] data,
  input  logic         ack,
  output int           checks,
  output int           failures,
  output int           sent,
  output logic         done
);

  logic [W-1:0] arrived;   // wire carries data
  logic [W-1:0] cleared;   // wire back at spacer

  initial begin
    data     = '0;
    arrived  = '0;
    cleared  = '1;
    checks   = 0;
    failures = 0;
    sent     = 0;
    done     = 1'b0;
    wait (!rst);
    for (int unsigned k = 0; k < N_TOKENS; k++) begin
      int unsigned order[W];
      int unsigned late_wire;
      int unsigned i;
      foreach (order[i]) order[i] = i;
      order.shuffle();
      late_wire = ($urandom_range(0, 2) == 0) ? $urandom_range(0, W - 1) : W;
      wait (ack === 1'b1);
      #($urandom_range(1, 3));
      foreach (order[j]) begin
        i = order[j];
        #(i == late_wire ? LATE : $urandom_range(1, 6));
        cleared[i] = 1'b0;
        arrived[i] = 1'b1;
        data[i]    = dr_encode(token_bit(SEED, k, i));
      end
      wait (ack === 1'b0);
      #($urandom_range(1, 3));
      order.shuffle();
      foreach (order[j]) begin
        i = order[j];
        #($urandom_range(1, 6));
        arrived[i] = 1'b0;
        cleared[i] = 1'b1;
        data[i]    = '0;
      end
      sent++;
    end
    done = 1'b1;
  end

  // The acknowledgement must indicate every input wire.
  always @(negedge ack) if (!rst && sent < N_TOKENS) begin
    checks++;
    if (arrived != '1) begin
      failures++;
      $display("%0t dr_sender(%0d): ack fell before all wires carried data (%b)",
               $time, SEED, arrived);
    end
  end

  always @(posedge ack) if (!rst && sent < N_TOKENS) begin
    checks++;
    if (cleared != '1) begin
      failures++;
      $display("%0t dr_sender(%0d): ack rose before all wires were spacer (%b)",
               $time, SEED, cleared);
    end
  end

endmodule
