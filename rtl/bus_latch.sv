// bus_latch: enabled register of the bus transmitter.
//
// Three instances make up the storage of the transmitter: the sender-side
// latch that captures Data_In and Ready_In, the output latch that drives the
// wires (Data_Out), and the previous-data register that remembers the last
// word sent so the analyzer can see the transitions of the next one. Each is
// an edge-triggered register with a load enable; the design calls them
// latches, and building them as flip-flops with a synchronous active-low
// reset to RESET_VALUE is this implementation's choice.
//
// Interface: q takes d at the rising clock edge when en is high and holds
// otherwise.
module bus_latch #(
  parameter int unsigned     WIDTH       = 32,
  parameter logic [WIDTH-1:0] RESET_VALUE = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)  q <= RESET_VALUE;
    else if (en) q <= d;
  end

endmodule
