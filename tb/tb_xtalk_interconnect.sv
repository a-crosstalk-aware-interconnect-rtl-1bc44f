// tb_xtalk_interconnect: end-to-end test of the crosstalk-aware transmitter.
//
// Two transmitters run side by side from the same kind of traffic: the plain
// design at its default parameters and the bus-invert combination. Each is
// driven and checked by an xtalk_stream_checker (sender, crosstalk wire model,
// receiver), which verifies data integrity through the delay-accurate wires,
// per-word cycle counts against an independent capacitance model, and that
// every mechanism (1-4 cycle holds, sender stall, idle bus, inverted word)
// occurred.
module tb_xtalk_interconnect;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] d_in0, d_out0, d_in1, d_out1;
  logic        r_in0, take0, inv0, r_out0, r_in1, take1, inv1, r_out1;
  logic        done0, done1;
  int          c0, f0, c1, f1;

  xtalk_interconnect dut_plain (
    .clk, .rst_n, .data_in(d_in0), .ready_in(r_in0), .take_in(take0),
    .data_out(d_out0), .inv_out(inv0), .ready_out(r_out0));

  xtalk_interconnect #(.BUS_INVERT(1'b1)) dut_bi (
    .clk, .rst_n, .data_in(d_in1), .ready_in(r_in1), .take_in(take1),
    .data_out(d_out1), .inv_out(inv1), .ready_out(r_out1));

  xtalk_stream_checker #(.BUS_INVERT(1'b0), .NWORDS(3000)) chk_plain (
    .clk, .rst_n, .data_in(d_in0), .ready_in(r_in0), .take_in(take0),
    .data_out(d_out0), .inv_out(inv0), .ready_out(r_out0),
    .done(done0), .checks(c0), .failures(f0));

  xtalk_stream_checker #(.BUS_INVERT(1'b1), .NWORDS(3000)) chk_bi (
    .clk, .rst_n, .data_in(d_in1), .ready_in(r_in1), .take_in(take1),
    .data_out(d_out1), .inv_out(inv1), .ready_out(r_out1),
    .done(done1), .checks(c1), .failures(f1));

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog: plain done=%b, bus-invert done=%b", done0, done1);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    wait (done0 && done1);
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1);
    $finish;
  end
endmodule
