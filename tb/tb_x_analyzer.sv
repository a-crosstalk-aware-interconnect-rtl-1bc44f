// tb_x_analyzer: checks the 32-bit crosstalk analyzer against the
// capacitance model of xtalk_tb_pkg, on directed patterns (all lines rising,
// one isolated line, alternating opposite transitions, edge lines) and on
// several thousand biased random word pairs. Also counts how often each
// worst group was seen and fails if groups 1..6 were not all reached.
module tb_x_analyzer;
  import xtalk_pkg::*;
  import xtalk_tb_pkg::*;

  localparam int W = 32;
  logic [W-1:0] p, c;
  grp_flags_t   f;
  int checks = 0, failures = 0;
  int seen[7];

  x_analyzer #(.WIDTH(W)) dut (.pdata(p), .cdata(c), .flags(f));

  task automatic chk;
    bit e4, e5, e6;
    #1;
    e4 = 0; e5 = 0; e6 = 0;
    for (int k = 0; k < W; k++) begin
      case (line_group(64'(p), 64'(c), W, k))
        4: e4 = 1;
        5: e5 = 1;
        6: e6 = 1;
        default: ;
      endcase
    end
    seen[word_group(64'(p), 64'(c), W)]++;
    checks++;
    if ({f.g6, f.g5, f.g4} !== {e6, e5, e4}) begin
      failures++;
      $display("FAIL p=%h c=%h flags=%b%b%b expected %b%b%b", p, c, f.g6, f.g5, f.g4, e6, e5, e4);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[i]) seen[i] = 0;
    p = '0;          c = '0;          chk();   // nothing moves: group 1
    p = '0;          c = '1;          chk();   // all rising: group 2
    p = 32'h0;       c = 32'h3;       chk();   // pair rising at the edge: group 3
    p = 32'h0;       c = 32'h0001_0000; chk(); // isolated line: group 4
    p = 32'h0002_0000; c = 32'h0001_0000; chk(); // one quiet, one opposite: group 5
    p = 32'h5555_5555; c = 32'hAAAA_AAAA; chk(); // all neighbours opposite: group 6
    p = 32'h8000_0000; c = 32'h4000_0000; chk(); // top edge lines opposite
    p = 32'h0000_0001; c = 32'h0000_0002; chk(); // bottom edge lines opposite
    for (int i = 0; i < 5000; i++) begin
      p = c;
      c = W'(next_word(64'(p), W));
      chk();
    end
    for (int g = 1; g <= 6; g++) begin
      checks++;
      if (seen[g] == 0) begin failures++; $display("FAIL worst group %0d never seen", g); end
    end
    $display("worst-group histogram: g1=%0d g2=%0d g3=%0d g4=%0d g5=%0d g6=%0d",
             seen[1], seen[2], seen[3], seen[4], seen[5], seen[6]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
