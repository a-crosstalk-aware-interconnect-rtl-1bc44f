// x_analyzer: crosstalk analyzer of the variable-cycle bus.
//
// Compares the word about to be sent (cdata) with the word currently on the
// wires (pdata) and reports which of the delay groups 4, 5 and 6 occur on any
// line. One pattern recognizer per line looks at lines k-1, k, k+1 and flags
// line k's group; three OR trees collect the flags of all lines. The worst
// line decides the delay of the whole bus, so the generator acts on the
// highest flag that is set. This structure (a recognizer per line and an OR
// tree per group) follows the design; the edge-line rule is in
// pattern_recognizer.
//
// Interface: pdata, cdata are WIDTH-bit words; flags.g4/g5/g6 are high when
// at least one line is in that group. Combinational; the transmitter gives it
// the cycle in which a word waits in the sender latch.
module x_analyzer
  import xtalk_pkg::*;
#(
  parameter int unsigned WIDTH = BUS_WIDTH
) (
  input  logic [WIDTH-1:0] pdata,
  input  logic [WIDTH-1:0] cdata,
  output grp_flags_t       flags
);

  logic [WIDTH-1:0] line_g4, line_g5, line_g6;

  // Pad with one zero bit on each side so that every recognizer gets three
  // lines; the edge recognizers ignore the padding through their parameters.
  logic [WIDTH+1:0] p_ext, c_ext;
  assign p_ext = {1'b0, pdata, 1'b0};
  assign c_ext = {1'b0, cdata, 1'b0};

  for (genvar k = 0; k < WIDTH; k++) begin : g_pr
    pattern_recognizer #(
      .HAS_LEFT (k > 0),
      .HAS_RIGHT(k < WIDTH - 1)
    ) u_pr (
      .pdata(p_ext[k +: 3]),
      .cdata(c_ext[k +: 3]),
      .g4   (line_g4[k]),
      .g5   (line_g5[k]),
      .g6   (line_g6[k])
    );
  end

  or_tree #(.N(WIDTH)) u_or_g4 (.in(line_g4), .out(flags.g4));
  or_tree #(.N(WIDTH)) u_or_g5 (.in(line_g5), .out(flags.g5));
  or_tree #(.N(WIDTH)) u_or_g6 (.in(line_g6), .out(flags.g6));

endmodule
