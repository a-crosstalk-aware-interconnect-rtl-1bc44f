// tb_workload_group_mix: the transmitter carrying traffic with the average
// crosstalk-group shares of processor bus traces (22.64 %, 0.05 %, 4.06 %,
// 35.4 %, 24.2 %, 13.7 % for groups 1..6).
//
// The plain transmitter runs at its default parameters; the bus-invert
// variant runs beside it on the same kind of traffic. Besides the end-to-end
// checks of xtalk_stream_checker, the plain run must come within two points
// of the 31.5 % average cycle saving over a bus clocked for the worst case
// (3.28 fast cycles per word) that was reported for those traces. The
// bus-invert saving is printed for comparison.
module tb_workload_group_mix;
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

  xtalk_stream_checker #(.BUS_INVERT(1'b0), .NWORDS(10000), .TRAFFIC(1)) chk_plain (
    .clk, .rst_n, .data_in(d_in0), .ready_in(r_in0), .take_in(take0),
    .data_out(d_out0), .inv_out(inv0), .ready_out(r_out0),
    .done(done0), .checks(c0), .failures(f0));

  xtalk_stream_checker #(.BUS_INVERT(1'b1), .NWORDS(10000), .TRAFFIC(1)) chk_bi (
    .clk, .rst_n, .data_in(d_in1), .ready_in(r_in1), .take_in(take1),
    .data_out(d_out1), .inv_out(inv1), .ready_out(r_out1),
    .done(done1), .checks(c1), .failures(f1));

  initial begin
    repeat (500000) @(posedge clk);
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
