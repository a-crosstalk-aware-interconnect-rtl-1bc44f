// tb_xtalk_full: the transmitter exactly at its default parameters (32-bit
// bus, plain variable-cycle transmission) carrying a stream of 5000 words
// through the crosstalk wire model to a receiver, with all end-to-end checks
// of xtalk_stream_checker.
module tb_xtalk_full;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] d_in, d_out;
  logic        r_in, take, inv, r_out, done;
  int          checks, failures;

  xtalk_interconnect dut (
    .clk, .rst_n, .data_in(d_in), .ready_in(r_in), .take_in(take),
    .data_out(d_out), .inv_out(inv), .ready_out(r_out));

  xtalk_stream_checker #(.BUS_INVERT(1'b0), .NWORDS(5000)) chk (
    .clk, .rst_n, .data_in(d_in), .ready_in(r_in), .take_in(take),
    .data_out(d_out), .inv_out(inv), .ready_out(r_out),
    .done, .checks, .failures);

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    wait (done);
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
