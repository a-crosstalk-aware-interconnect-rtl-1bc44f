// tb_bus_invert_coder: checks that the coded word is the bitwise complement
// of the input and that coding twice restores the word.
module tb_bus_invert_coder;
  logic [31:0] d, c, cc;
  int checks = 0, failures = 0;

  bus_invert_coder #(.WIDTH(32)) u1 (.data_in(d), .coded(c));
  bus_invert_coder #(.WIDTH(32)) u2 (.data_in(c), .coded(cc));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      d = (i == 0) ? 32'h0 : (i == 1) ? 32'hFFFF_FFFF : $urandom;
      #1;
      checks += 2;
      for (int k = 0; k < 32; k++)
        if (c[k] == d[k]) begin failures++; $display("FAIL bit %0d not inverted, d=%h c=%h", k, d, c); break; end
      if (cc !== d) begin failures++; $display("FAIL double coding d=%h cc=%h", d, cc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
