// xa_selector: chooses between the plain and the bus-inverted word.
//
// With bus-invert, two crosstalk analyzers judge the same word sent plain
// and sent inverted against the word on the wires. The selector compares the
// worst group each would cause and picks the inverted form only when it is
// strictly better, so a tie keeps the word as it is. It drives the data mux
// and passes the winning flags on to the cycle generator. The compare rule
// (worst group, tie to plain) is this implementation's choice; the design
// only names the block.
//
// Interface: flags_plain/flags_inv from the two analyzers; sel_inv = 1 selects
// the inverted word; flags = flags of the selected word. Combinational.
module xa_selector
  import xtalk_pkg::*;
(
  input  grp_flags_t flags_plain,
  input  grp_flags_t flags_inv,
  output logic       sel_inv,
  output grp_flags_t flags
);

  always_comb begin
    sel_inv = worst_rank(flags_inv) < worst_rank(flags_plain);
    flags   = sel_inv ? flags_inv : flags_plain;
  end

endmodule
