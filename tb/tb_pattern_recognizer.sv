// tb_pattern_recognizer: exhaustive check of the per-line crosstalk group.
//
// Three recognizers (inner line, left-edge line, right-edge line) get all 64
// combinations of previous/current values of three lines. Expected flags
// come from the capacitance model in xtalk_tb_pkg applied to a 3-line bus
// (inner) or a 2-line bus (edges).
module tb_pattern_recognizer;
  import xtalk_tb_pkg::*;

  logic [2:0] p, c;
  logic i4, i5, i6, l4, l5, l6, r4, r5, r6;
  int checks = 0, failures = 0;

  pattern_recognizer #(.HAS_LEFT(1'b1), .HAS_RIGHT(1'b1)) u_inner (.pdata(p), .cdata(c), .g4(i4), .g5(i5), .g6(i6));
  // Left edge: line k is bus line 0, no line below it.
  pattern_recognizer #(.HAS_LEFT(1'b0), .HAS_RIGHT(1'b1)) u_left  (.pdata(p), .cdata(c), .g4(l4), .g5(l5), .g6(l6));
  // Right edge: line k is the top bus line.
  pattern_recognizer #(.HAS_LEFT(1'b1), .HAS_RIGHT(1'b0)) u_right (.pdata(p), .cdata(c), .g4(r4), .g5(r5), .g6(r6));

  task automatic check(string what, int grp, logic a4, logic a5, logic a6);
    checks++;
    if ({a6, a5, a4} != {grp == 6, grp == 5, grp == 4}) begin
      failures++;
      $display("FAIL %s p=%b c=%b expected group %0d got g6..g4=%b%b%b", what, p, c, grp, a6, a5, a4);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hist[7];
    foreach (hist[i]) hist[i] = 0;
    for (int v = 0; v < 64; v++) begin
      p = v[2:0];
      c = v[5:3];
      #1;
      check("inner", line_group(64'(p), 64'(c), 3, 1), i4, i5, i6);
      hist[line_group(64'(p), 64'(c), 3, 1)]++;
      // Left edge: lines 1 (k) and 2 (neighbour) of a 2-line bus {2,1}.
      check("left",  line_group(64'(p[2:1]), 64'(c[2:1]), 2, 0), l4, l5, l6);
      // Right edge: lines 0 (neighbour) and 1 (k).
      check("right", line_group(64'(p[1:0]), 64'(c[1:0]), 2, 1), r4, r5, r6);
    end
    // Every group of the six-group table appears for the inner line.
    for (int g = 1; g <= 6; g++) begin
      checks++;
      if (hist[g] == 0) begin failures++; $display("FAIL group %0d never produced", g); end
    end
    // Spot checks written out from the pattern table.
    p = 3'b000; c = 3'b010; #1; checks++; if ({i6,i5,i4} != 3'b001) begin failures++; $display("FAIL spot p=%b c=%b", p, c); end  // - up -    : group 4
    p = 3'b101; c = 3'b010; #1; checks++; if ({i6,i5,i4} != 3'b100) begin failures++; $display("FAIL spot p=%b c=%b", p, c); end  // dn up dn  : group 6
    p = 3'b100; c = 3'b010; #1; checks++; if ({i6,i5,i4} != 3'b010) begin failures++; $display("FAIL spot p=%b c=%b", p, c); end  // - up dn   : group 5
    p = 3'b000; c = 3'b111; #1; checks++; if ({i6,i5,i4} != 3'b000) begin failures++; $display("FAIL spot p=%b c=%b", p, c); end  // up up up  : group 2
    p = 3'b100; c = 3'b011; #1; checks++; if ({i6,i5,i4} != 3'b001) begin failures++; $display("FAIL spot p=%b c=%b", p, c); end  // up up dn  : group 4
    p = 3'b000; c = 3'b011; #1; checks++; if ({i6,i5,i4} != 3'b000) begin failures++; $display("FAIL spot p=%b c=%b", p, c); end  // up up -   : group 3
    p = 3'b100; c = 3'b010; #1; checks++; if ({l6,l5,l4} != 3'b001) begin failures++; $display("FAIL spot p=%b c=%b", p, c); end  // edge, opposite neighbour: group 4
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
