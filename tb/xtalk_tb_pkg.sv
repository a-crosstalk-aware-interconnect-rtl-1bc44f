// xtalk_tb_pkg: reference model of crosstalk delay for the testbenches.
//
// Works from the physical numbers rather than from the RTL's tables: a
// switching line k sees Cg plus one Cc per neighbour, each counted with the
// Miller factor |d(k) - d(n)| (0, 1 or 2), where d is the line's change in
// {-1, 0, +1}. The line settles after ceil(Ctotal / (Cg + Cc)) fast cycles,
// the fast cycle being sized for Cg + Cc. Line capacitances per mm are
// Cg = 36.3 fF and Cc = 115.1 fF. A word needs the maximum over its lines,
// and at least one cycle.
package xtalk_tb_pkg;

  localparam real CG = 36.3;
  localparam real CC = 115.1;
  localparam int  MAXW = 64;

  function automatic int delta(bit p, bit c);
    return int'(c) - int'(p);
  endfunction

  // Number of coupling capacitances (with Miller factor) seen by line k.
  function automatic int coupling(logic [MAXW-1:0] p, logic [MAXW-1:0] c, int w, int k);
    int m, dk;
    dk = delta(p[k], c[k]);
    m  = 0;
    if (k > 0)     m += (dk - delta(p[k-1], c[k-1]) < 0) ? delta(p[k-1], c[k-1]) - dk : dk - delta(p[k-1], c[k-1]);
    if (k < w - 1) m += (dk - delta(p[k+1], c[k+1]) < 0) ? delta(p[k+1], c[k+1]) - dk : dk - delta(p[k+1], c[k+1]);
    return m;
  endfunction

  // Crosstalk group 1..6 of line k.
  function automatic int line_group(logic [MAXW-1:0] p, logic [MAXW-1:0] c, int w, int k);
    if (p[k] == c[k]) return 1;
    return 2 + coupling(p, c, w, k);
  endfunction

  // Fast cycles line k needs to settle (0 if it does not switch).
  function automatic int line_cycles(logic [MAXW-1:0] p, logic [MAXW-1:0] c, int w, int k);
    real ct;
    int  n;
    if (p[k] == c[k]) return 0;
    ct = CG + real'(coupling(p, c, w, k)) * CC;
    n  = int'($floor(ct / (CG + CC)));
    if (real'(n) * (CG + CC) < ct) n++;
    return n;
  endfunction

  // Fast cycles a whole word needs on the wires.
  function automatic int word_cycles(logic [MAXW-1:0] p, logic [MAXW-1:0] c, int w);
    int n = 1;
    for (int k = 0; k < w; k++)
      if (line_cycles(p, c, w, k) > n) n = line_cycles(p, c, w, k);
    return n;
  endfunction

  // Worst line group of a word (1..6).
  function automatic int word_group(logic [MAXW-1:0] p, logic [MAXW-1:0] c, int w);
    int g = 1;
    for (int k = 0; k < w; k++)
      if (line_group(p, c, w, k) > g) g = line_group(p, c, w, k);
    return g;
  endfunction

  // Random word biased towards bus-like traffic: mostly small changes to the
  // previous word, sometimes a fresh random word or a full inversion.
  function automatic logic [MAXW-1:0] next_word(logic [MAXW-1:0] p, int w);
    logic [MAXW-1:0] v;
    int sel = $urandom_range(0, 9);
    v = p;
    if (sel < 3)       v = p + MAXW'($urandom_range(1, 16));
    else if (sel < 5)  v[$urandom_range(0, w - 1)] ^= 1'b1;
    else if (sel < 7)  v = {$urandom, $urandom};
    else if (sel < 8)  v = ~p;
    else if (sel < 9)  v = {MAXW/2{2'b01}} ^ (p & {MAXW/2{2'b10}});
    else               v = p;
    if (w < MAXW) v &= (MAXW'(1) << w) - 1;
    return v;
  endfunction

  // Next word whose transition from p has a chosen worst group, drawn with
  // the average group shares measured on processor bus traffic:
  // 22.64 %, 0.05 %, 4.06 %, 35.4 %, 24.2 %, 13.7 % for groups 1..6 (the six
  // shares add up to 100.05 %, so they are drawn out of 10005). Only the lines
  // named below change; all others stay quiet.
  //   group 1: no change              group 2: whole bus switches one way
  //   group 3: bit 0 alone switches   group 4: one inner line alone
  //   group 5: two adjacent inner lines switch in opposite directions
  //   group 6: a 010/101 triple inverts (middle against both neighbours)
  // Group 2 needs an all-0 or all-1 word and groups 5/6 need a suitable
  // neighbour pattern; when p has none, a group-4 word is sent instead, which
  // creates one. target returns the group aimed at.
  function automatic logic [MAXW-1:0] mix_word(logic [MAXW-1:0] p, int w, output int target);
    logic [MAXW-1:0] v = p;
    int r = $urandom_range(0, 10004);
    int k, tries;
    bit found;
    if      (r < 2264) target = 1;
    else if (r < 2269) target = 2;
    else if (r < 2675) target = 3;
    else if (r < 6215) target = 4;
    else if (r < 8635) target = 5;
    else               target = 6;
    case (target)
      1: ;
      2: begin
        logic [MAXW-1:0] mask;
        mask = (w < MAXW) ? (MAXW'(1) << w) - 1 : '1;
        if ((p & mask) == '0 || (p & mask) == mask) v = ~p;
        else target = 4;
      end
      3: v[0] = ~p[0];
      5: begin
        found = 0;
        for (tries = 0; tries < 64 && !found; tries++) begin
          k = $urandom_range(1, w - 3);
          if (p[k] != p[k+1]) begin v[k] = ~p[k]; v[k+1] = ~p[k+1]; found = 1; end
        end
        if (!found) target = 4;
      end
      6: begin
        found = 0;
        for (tries = 0; tries < 64 && !found; tries++) begin
          k = $urandom_range(1, w - 2);
          if (p[k-1] != p[k] && p[k] != p[k+1]) begin
            v[k-1] = ~p[k-1]; v[k] = ~p[k]; v[k+1] = ~p[k+1]; found = 1;
          end
        end
        if (!found) target = 4;
      end
      default: ;
    endcase
    if (target == 4) begin
      v = p;
      k = $urandom_range(1, w - 2);
      v[k] = ~p[k];
    end
    if (w < MAXW) v &= (MAXW'(1) << w) - 1;
    return v;
  endfunction

endpackage
