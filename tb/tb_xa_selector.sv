// tb_xa_selector: all 64 combinations of the two analyzers' flags. The
// inverted word must be chosen exactly when its worst group (highest flag)
// is strictly lower than that of the plain word, and the passed-on flags
// must be those of the chosen word.
module tb_xa_selector;
  import xtalk_pkg::*;
  grp_flags_t fp, fi, fo;
  logic sel;
  int checks = 0, failures = 0;

  xa_selector dut (.flags_plain(fp), .flags_inv(fi), .sel_inv(sel), .flags(fo));

  function automatic int cycles_of(logic [2:0] f);   // {g6,g5,g4}
    return f[2] ? 4 : f[1] ? 3 : f[0] ? 2 : 1;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int picks_inv = 0;
    for (int v = 0; v < 64; v++) begin
      fp = grp_flags_t'(v[2:0]);
      fi = grp_flags_t'(v[5:3]);
      #1;
      checks += 2;
      if (sel !== (cycles_of(v[5:3]) < cycles_of(v[2:0]))) begin
        failures++; $display("FAIL plain=%b inv=%b sel=%b", v[2:0], v[5:3], sel);
      end
      if (fo !== (sel ? fi : fp)) begin failures++; $display("FAIL flags out %b", fo); end
      if (sel) picks_inv++;
    end
    checks++;
    if (picks_inv == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
