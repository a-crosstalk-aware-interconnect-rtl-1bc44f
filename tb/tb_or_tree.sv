// tb_or_tree: checks the OR tree at the bus width (32) and at an odd width
// (5, exercising the zero padding) with zero, one-hot and random inputs.
module tb_or_tree;
  logic [31:0] a;
  logic [4:0]  b;
  logic        ya, yb;
  int checks = 0, failures = 0;

  or_tree #(.N(32)) u_a (.in(a), .out(ya));
  or_tree #(.N(5))  u_b (.in(b), .out(yb));

  task automatic chk;
    #1;
    checks += 2;
    if (ya !== (a != 0)) begin failures++; $display("FAIL N=32 in=%h out=%b", a, ya); end
    if (yb !== (b != 0)) begin failures++; $display("FAIL N=5 in=%b out=%b", b, yb); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; chk();
    for (int i = 0; i < 32; i++) begin
      a = 32'd1 << i; b = 5'd1 << (i % 5); chk();
    end
    for (int i = 0; i < 200; i++) begin
      a = $urandom & $urandom & $urandom; b = 5'($urandom & $urandom); chk();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
