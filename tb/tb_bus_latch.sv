// tb_bus_latch: checks reset value, load when enabled and hold when not,
// against a shadow copy kept by the testbench.
module tb_bus_latch;
  localparam int W = 33;
  logic clk = 0, rst_n, en;
  logic [W-1:0] d, q, q2, model;
  int checks = 0, failures = 0;

  bus_latch #(.WIDTH(W)) dut (.clk, .rst_n, .en, .d, .q);
  bus_latch #(.WIDTH(W), .RESET_VALUE(33'h1_0000_00A5)) dut2 (.clk, .rst_n, .en(1'b0), .d, .q(q2));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; en = 1; d = '1;
    @(posedge clk); #1;
    checks += 2;
    if (q !== '0) begin failures++; $display("FAIL reset q=%h", q); end
    if (q2 !== 33'h1_0000_00A5) begin failures++; $display("FAIL reset value q2=%h", q2); end
    rst_n = 1;
    model = '0;
    for (int i = 0; i < 300; i++) begin
      en = ($urandom_range(0, 2) != 0);
      d  = {1'($urandom), $urandom};
      @(posedge clk);
      if (en) model = d;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL cycle %0d en=%b q=%h expected %h", i, en, q, model); end
    end
    checks++;
    if (q2 !== 33'h1_0000_00A5) begin failures++; $display("FAIL disabled latch changed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
