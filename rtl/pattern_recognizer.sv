// pattern_recognizer: crosstalk group of one bus line for one transfer.
//
// Line k's effective load is Cg plus Cc times a coupling multiplier that
// depends on how k and its two neighbours switch. With each line's change
// d = new - old in {-1, 0, +1}, the multiplier of an inner line is
// |2*d(k) - d(k-1) - d(k+1)|: 0 when all three move together, 1 when one
// neighbour is quiet and the other follows, 2 when both are quiet, 3 when one
// is quiet and one opposes, 4 when both oppose. A line that does not switch is
// group 1; multipliers 0..4 are groups 2..6. Only groups 4, 5 and 6 raise a
// flag, because groups 1-3 all fit in one fast cycle.
//
// The grouping follows the six-group pattern table of the design. A line at
// the edge of the bus has one neighbour and one coupling capacitance, so its
// multiplier is |d(k) - d(neighbour)| (0, 1 or 2); that rule, and ignoring the
// Ready wire as a neighbour, are this implementation's choices.
//
// Interface: pdata/cdata carry the previous and the current value of lines
// k-1 (bit 0), k (bit 1) and k+1 (bit 2). HAS_LEFT/HAS_RIGHT say whether
// the neighbour exists; a missing neighbour's bits are ignored. Purely
// combinational, at most one of g4/g5/g6 is high.
module pattern_recognizer #(
  parameter bit HAS_LEFT  = 1'b1,
  parameter bit HAS_RIGHT = 1'b1
) (
  input  logic [2:0] pdata,
  input  logic [2:0] cdata,
  output logic       g4,
  output logic       g5,
  output logic       g6
);

  // Signed change of each of the three lines: -1, 0 or +1.
  logic signed [3:0] d_left, d_self, d_right;
  logic signed [3:0] coupling;
  logic        [3:0] mult;

  always_comb begin
    d_left  = HAS_LEFT  ? (4'(signed'({1'b0, cdata[0]})) - 4'(signed'({1'b0, pdata[0]}))) : 4'sd0;
    d_self  =              4'(signed'({1'b0, cdata[1]})) - 4'(signed'({1'b0, pdata[1]}));
    d_right = HAS_RIGHT ? (4'(signed'({1'b0, cdata[2]})) - 4'(signed'({1'b0, pdata[2]}))) : 4'sd0;

    // One coupling capacitance per existing neighbour.
    coupling = d_self * 4'(signed'({2'b00, HAS_LEFT}) + signed'({2'b00, HAS_RIGHT}))
               - d_left - d_right;
    mult     = (coupling < 0) ? 4'(-coupling) : 4'(coupling);

    g4 = (d_self != 0) && (mult == 4'd2);
    g5 = (d_self != 0) && (mult == 4'd3);
    g6 = (d_self != 0) && (mult == 4'd4);
  end

endmodule
