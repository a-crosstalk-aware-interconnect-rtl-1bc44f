// xtalk_interconnect: crosstalk-aware bus transmitter with variable-cycle
// transmission.
//
// The sender side of a 32-bit on-chip bus whose wire delay depends on how
// adjacent wires switch. Instead of clocking every transfer at the
// worst-case delay (opposite transitions on both neighbours), the bus runs on
// a clock about 3.3 times faster, sized for one coupling capacitance, and
// each word occupies the wires for 1 to 4 fast cycles according to the worst
// crosstalk group its transition causes.
//
// Datapath (left to right): the sender latch captures Data_In and Ready_In;
// the crosstalk analyzer compares the latched word with the previous-data
// register (the word now on the wires); the cycle generator turns the group
// flags into a hold time, loads the output latch (Data_Out) and the
// previous-data register, raises Ready_Out in the last cycle of the word and
// paces the sender latch. This structure follows the design.
//
// With BUS_INVERT = 1 (the combined extension; the default, 0, is the plain
// design) a coder forms the inverted word, a second analyzer judges it, a
// selector keeps whichever form has the smaller worst group and a mux sends
// it; inv_out is the extra wire telling the receiver that the word on
// Data_Out is inverted. The extra wire, and the invert bit being stored with
// the previous word, are this implementation's choices; the invert wire's own
// crosstalk is not modelled. With BUS_INVERT = 0, inv_out is a constant 0,
// kept so that both variants share one port list.
//
// Interface and timing (all on the rising edge of clk, synchronous active-low
// rst_n): the sender presents data_in with ready_in high and holds both until
// a cycle in which take_in is high; the word is captured at that edge. It
// appears on data_out one cycle after leaving the sender latch and stays for
// its hold time; ready_out is high in the last of those cycles, when the
// receiver should sample data_out (and inv_out). Back-to-back words of groups
// 1-3 give one word per cycle with ready_out held high.
module xtalk_interconnect
  import xtalk_pkg::*;
#(
  parameter int unsigned WIDTH      = BUS_WIDTH,
  parameter bit          BUS_INVERT = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  // sender side
  input  logic [WIDTH-1:0] data_in,
  input  logic             ready_in,
  output logic             take_in,
  // wires to the receiver
  output logic [WIDTH-1:0] data_out,
  output logic             inv_out,
  output logic             ready_out
);

  logic [WIDTH-1:0] lat_data;      // Data_In after the sender latch
  logic             lat_rdy;       // Ready_In after the sender latch
  logic [WIDTH-1:0] prev_data;     // previous word sent
  logic [WIDTH-1:0] send_data;     // word chosen for the wires
  logic             send_inv;
  grp_flags_t       flags;
  logic             launch, load_in, busy;

  // Sender latch.
  bus_latch #(.WIDTH(WIDTH + 1)) u_sender_latch (
    .clk, .rst_n,
    .en(load_in),
    .d ({ready_in, data_in}),
    .q ({lat_rdy, lat_data})
  );

  assign take_in = load_in;

  // Crosstalk analysis of the latched word against the previous word.
  grp_flags_t flags_plain;
  x_analyzer #(.WIDTH(WIDTH)) u_xa (
    .pdata(prev_data),
    .cdata(lat_data),
    .flags(flags_plain)
  );

  if (BUS_INVERT) begin : g_bi
    logic [WIDTH-1:0] coded;
    grp_flags_t       flags_inv;
    logic             sel_inv;

    bus_invert_coder #(.WIDTH(WIDTH)) u_coder (
      .data_in(lat_data),
      .coded  (coded)
    );
    x_analyzer #(.WIDTH(WIDTH)) u_xa_inv (
      .pdata(prev_data),
      .cdata(coded),
      .flags(flags_inv)
    );
    xa_selector u_sel (
      .flags_plain(flags_plain),
      .flags_inv  (flags_inv),
      .sel_inv    (sel_inv),
      .flags      (flags)
    );
    // Data mux.
    assign send_data = sel_inv ? coded : lat_data;
    assign send_inv  = sel_inv;
  end else begin : g_plain
    assign send_data = lat_data;
    assign send_inv  = 1'b0;
    assign flags     = flags_plain;
  end

  cycle_generator u_gen (
    .clk, .rst_n,
    .rdy_lat  (lat_rdy),
    .flags    (flags),
    .launch   (launch),
    .load_in  (load_in),
    .ready_out(ready_out),
    .busy     (busy)
  );

  // Previous-data register: the word now on the wires, as the analyzer's
  // reference for the next transition.
  bus_latch #(.WIDTH(WIDTH)) u_prev (
    .clk, .rst_n,
    .en(launch),
    .d (send_data),
    .q (prev_data)
  );

  // Output latch driving the interconnect.
  bus_latch #(.WIDTH(WIDTH + 1)) u_out_latch (
    .clk, .rst_n,
    .en(launch),
    .d ({send_inv, send_data}),
    .q ({inv_out, data_out})
  );

  // Data_Out only changes when the previous word has had its full time.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (busy && !ready_out) |=> $stable(data_out));

endmodule
