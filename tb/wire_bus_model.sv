// wire_bus_model: behavioural model of the crosstalk-limited bus wires.
//
// Not synthesizable logic: it stands in for the metal wires between the
// transmitter's output latch and the receiver, at the level of fast clock
// cycles. When the driven word changes, each switching wire k needs
// ceil((Cg + m*Cc) / (Cg + Cc)) cycles to settle, where m is its Miller-
// weighted coupling count (see xtalk_tb_pkg). Until then the receiver side
// of that wire still shows the old value, so a receiver that samples too
// early gets stale bits. Evaluated on the falling clock edge, so the
// receiver sees at a rising edge whether each wire has settled by the end of
// the cycle that edge closes.
//
// Ports: drive is the word driven onto the wires (the transmitter's
// Data_Out); rx is what the far end sees; settled is high when every wire
// has reached the driven value.
module wire_bus_model #(
  parameter int WIDTH = 32
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] drive,
  output logic [WIDTH-1:0] rx,
  output logic             settled
);
  import xtalk_tb_pkg::*;

  logic [WIDTH-1:0] last_drive = '0;
  logic [WIDTH-1:0] old_val    = '0;
  int               need[WIDTH];
  int               age = 0;

  initial begin
    rx = '0;
    settled = 1'b1;
    foreach (need[k]) need[k] = 0;
  end

  always @(negedge clk) begin
    if (drive !== last_drive) begin
      for (int k = 0; k < WIDTH; k++)
        need[k] = line_cycles(64'(last_drive), 64'(drive), WIDTH, k);
      old_val    = rx;
      last_drive = drive;
      age        = 1;
    end else begin
      age++;
    end
    settled = 1'b1;
    for (int k = 0; k < WIDTH; k++) begin
      if (age >= need[k]) rx[k] = drive[k];
      else begin
        rx[k]   = old_val[k];
        settled = 1'b0;
      end
    end
  end
endmodule
