// xtalk_pkg: shared constants and types of the crosstalk-aware bus transmitter.
//
// The bus is 32 bits wide. Every transfer is classified by the crosstalk
// group of its worst wire. Groups 1-3 (no transition, or a transition with at
// most one coupling capacitance charged) fit in one fast clock cycle; groups
// 4, 5 and 6 (2, 3 and 4 coupling capacitances) need 2, 3 and 4 cycles. The
// fast cycle is sized for Cg + Cc, so group n with load Cg + m*Cc needs
// ceil((Cg + m*Cc) / (Cg + Cc)) cycles; with Cg = 36.3 fF/mm and
// Cc = 115.1 fF/mm this gives 1, 2, 3, 4 for m = 1..4, and the worst case is
// 3.28 fast cycles, the slow clock of a conventional bus.
//
// The analyzer reports only groups 4, 5 and 6, as three flags; groups 1-3
// need no flag because they all take the minimum of one cycle.
package xtalk_pkg;

  // Width of the data bus.
  parameter int unsigned BUS_WIDTH = 32;

  // Fast clock cycles a transfer occupies the wires, per worst group.
  parameter int unsigned CYC_G123 = 1;
  parameter int unsigned CYC_G4   = 2;
  parameter int unsigned CYC_G5   = 3;
  parameter int unsigned CYC_G6   = 4;

  // Bus-wide group flags from the crosstalk analyzer.
  typedef struct packed {
    logic g6;
    logic g5;
    logic g4;
  } grp_flags_t;

  // Worst group of a transfer, as a rank: 0 = groups 1-3, 1 = group 4,
  // 2 = group 5, 3 = group 6. The largest group present decides.
  function automatic logic [1:0] worst_rank(grp_flags_t f);
    if (f.g6)      return 2'd3;
    else if (f.g5) return 2'd2;
    else if (f.g4) return 2'd1;
    else           return 2'd0;
  endfunction

endpackage
