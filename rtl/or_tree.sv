// or_tree: balanced tree of two-input OR gates.
//
// Merges N per-line flags into one bus-wide flag. The tree is built level by
// level in a flat node array (heap order: node i has children 2i and 2i+1),
// padded with zeros to a power of two, so its depth is ceil(log2 N) gates.
// The crosstalk analyzer uses three of these, one each for groups 4, 5 and 6;
// the balanced shape is this implementation's choice.
//
// Interface: in[N-1:0] flags, out = OR of all of them. Combinational.
module or_tree #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] in,
  output logic         out
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0;
  localparam int unsigned LEAVES = 1 << LEVELS;

  // node[1] is the root, node[LEAVES .. 2*LEAVES-1] are the leaves.
  logic [2*LEAVES-1:0] node;

  always_comb begin
    node = '0;
    for (int i = 0; i < int'(LEAVES); i++)
      node[LEAVES + i] = (i < int'(N)) ? in[i] : 1'b0;
    for (int i = int'(LEAVES) - 1; i >= 1; i--)
      node[i] = node[2*i] | node[2*i + 1];
  end

  assign out = node[1];

endmodule
