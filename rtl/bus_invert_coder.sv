// bus_invert_coder: the coding stage of the bus-invert extension.
//
// Bus-invert lets a word travel either as it is or with every bit inverted,
// with one extra wire telling the receiver which; the receiver undoes it by
// inverting again when that wire is high. This block produces the inverted
// candidate that the second crosstalk analyzer judges and the data mux may
// send. The design names the coder without detailing it; plain full-word
// inversion is this implementation's reading of it.
//
// Interface: coded = data_in with all bits inverted. Combinational.
module bus_invert_coder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] data_in,
  output logic [WIDTH-1:0] coded
);

  assign coded = ~data_in;

endmodule
