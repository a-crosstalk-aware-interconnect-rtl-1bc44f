// xtalk_stream_checker: sender, wire model and receiver around one
// crosstalk-aware transmitter, with the end-to-end checks.
//
// Sender: offers NWORDS bus-like words (see xtalk_tb_pkg::next_word). During
// the first half it always has a word ready; during the second half it
// offers one only some of the time, so the bus also goes idle. A word is
// held on data_in/ready_in until take_in is high at a clock edge.
// Wires: wire_bus_model delays every line by its crosstalk settling time;
// the receiver sees stale bits if it samples before a line has settled.
// Receiver: samples the far end of the wires at each edge that closes a cycle
// with ready_out high, undoes bus-invert when inv_out is high (BUS_INVERT),
// and checks:
//  - words arrive complete, in order and uncorrupted by unsettled wires;
//  - the invert choice is the one with fewer cycles (ties: not inverted);
//  - each word's spacing equals the reference hold time while streaming and
//    is at least that afterwards; the first word arrives 1 + N cycles after
//    it is taken;
//  - the cycles used while streaming equal the sum of the reference holds.
// It counts each mechanism (hold of 1, 2, 3, 4 cycles, sender stall, idle
// bus, inverted word) and counts a failure for one that never happened.
// It also prints the worst-group breakdown and the cycles a conventional bus
// clocked for the worst case would take (3.28 fast cycles per word).
module xtalk_stream_checker #(
  parameter int WIDTH      = 32,
  parameter bit BUS_INVERT = 1'b0,
  parameter int NWORDS     = 2000,
  // 0: bus-like random traffic (next_word); 1: words built to follow the
  // average group shares of processor bus traffic (mix_word), and the
  // saving over a worst-case clocked bus is compared with the published
  // 31.5 % average.
  parameter int TRAFFIC    = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [WIDTH-1:0] data_in,
  output logic             ready_in,
  input  logic             take_in,
  input  logic [WIDTH-1:0] data_out,
  input  logic             inv_out,
  input  logic             ready_out,
  output logic             done,
  output int               checks,
  output int               failures
);
  import xtalk_tb_pkg::*;

  logic [WIDTH-1:0] rx;
  logic             settled;
  wire_bus_model #(.WIDTH(WIDTH)) u_wires (.clk, .drive(data_out), .rx, .settled);

  logic [WIDTH-1:0] words[NWORDS];
  int  n_sent, n_recv, cycle, take_cycle0, last_rx_cycle;
  int  stream_words, stream_cycles, stream_end;
  logic [WIDTH-1:0] exp_wire_prev;
  int  cnt_hold[5], cnt_group[7], cnt_stall, cnt_idle, cnt_inv;
  real ori_cycles;

  initial begin
    automatic logic [63:0] w = '0;
    for (int i = 0; i < NWORDS; i++) begin
      int tgt;
      if (TRAFFIC == 1) w = mix_word(w, WIDTH, tgt);
      else              w = next_word(w, WIDTH);
      words[i] = WIDTH'(w);
    end
    checks = 0; failures = 0; done = 0;
    n_sent = 0; n_recv = 0; cycle = 0; take_cycle0 = -1; last_rx_cycle = 0;
    stream_words = 0; stream_cycles = 0; stream_end = NWORDS / 2;
    exp_wire_prev = '0;
    foreach (cnt_hold[i]) cnt_hold[i] = 0;
    foreach (cnt_group[i]) cnt_group[i] = 0;
    cnt_stall = 0; cnt_idle = 0; cnt_inv = 0;
    ori_cycles = 0.0;
    data_in = '0; ready_in = 0;
  end

  always @(posedge clk) begin
    if (rst_n && !done) begin
      cycle++;
      // ---------------- receiver ----------------
      if (ready_out) begin
        int np, ni, n, grp;
        bit exp_inv;
        logic [WIDTH-1:0] exp_wire, got;
        np = word_cycles(64'(exp_wire_prev), 64'(words[n_recv]), WIDTH);
        ni = BUS_INVERT ? word_cycles(64'(exp_wire_prev), 64'(~words[n_recv]), WIDTH) : 99;
        exp_inv  = BUS_INVERT && (ni < np);
        n        = exp_inv ? ni : np;
        exp_wire = exp_inv ? ~words[n_recv] : words[n_recv];
        grp      = word_group(64'(exp_wire_prev), 64'(exp_wire), WIDTH);
        got      = rx ^ {WIDTH{inv_out}};
        checks += 3;
        if (got !== words[n_recv]) begin
          failures++;
          $display("FAIL word %0d received %h expected %h (settled=%b)", n_recv, got, words[n_recv], settled);
        end
        if (inv_out !== exp_inv) begin
          failures++; $display("FAIL word %0d inv=%b expected %b", n_recv, inv_out, exp_inv);
        end
        if (n_recv == 0) begin
          if (cycle - take_cycle0 != 1 + n) begin
            failures++; $display("FAIL first word latency %0d expected %0d", cycle - take_cycle0, 1 + n);
          end
        end else if (n_recv <= stream_end - 2) begin
          if (cycle - last_rx_cycle != n) begin
            failures++; $display("FAIL word %0d spacing %0d expected %0d", n_recv, cycle - last_rx_cycle, n);
          end
        end else if (cycle - last_rx_cycle < n) begin
          failures++; $display("FAIL word %0d spacing %0d below %0d", n_recv, cycle - last_rx_cycle, n);
        end
        if (n_recv >= 1 && n_recv <= stream_end - 2) begin
          stream_words++;
          stream_cycles += cycle - last_rx_cycle;
        end
        cnt_hold[n]++;
        cnt_group[grp]++;
        if (exp_inv) cnt_inv++;
        ori_cycles += 3.28;
        exp_wire_prev = exp_wire;
        last_rx_cycle = cycle;
        n_recv++;
      end
      // ---------------- sender ----------------
      if (ready_in && take_in) begin
        if (n_sent == 0) take_cycle0 = cycle;
        n_sent++;
      end else if (ready_in) begin
        cnt_stall++;
      end
      if (!ready_in || take_in) begin
        int idx;
        idx = n_sent;
        if (idx < NWORDS && (idx < stream_end || $urandom_range(0, 2) == 0)) begin
          ready_in <= 1'b1;
          data_in  <= words[idx];
        end else begin
          ready_in <= 1'b0;
          data_in  <= WIDTH'({$urandom, $urandom});   // junk while not offered
          if (idx < NWORDS) cnt_idle++;
        end
      end
      if (n_recv == NWORDS) done <= 1'b1;
    end
  end

  // Final accounting, run once when all words are in.
  always @(posedge done) begin
    checks += 1;
    if (stream_cycles == 0) failures++;
    for (int n = 1; n <= 4; n++) begin
      checks++;
      if (cnt_hold[n] == 0) begin failures++; $display("FAIL no word held %0d cycle(s)", n); end
    end
    checks += 2;
    if (cnt_stall == 0) begin failures++; $display("FAIL sender never stalled"); end
    if (cnt_idle == 0)  begin failures++; $display("FAIL bus never idle"); end
    if (BUS_INVERT) begin
      checks++;
      if (cnt_inv == 0) begin failures++; $display("FAIL no word sent inverted"); end
    end
    $display("[BUS_INVERT=%0d] %0d words; groups 1..6: %0d %0d %0d %0d %0d %0d; holds 1..4: %0d %0d %0d %0d; inverted %0d; stalls %0d; idle %0d",
             BUS_INVERT, NWORDS, cnt_group[1], cnt_group[2], cnt_group[3], cnt_group[4], cnt_group[5], cnt_group[6],
             cnt_hold[1], cnt_hold[2], cnt_hold[3], cnt_hold[4], cnt_inv, cnt_stall, cnt_idle);
    if (TRAFFIC == 1 && !BUS_INVERT) begin
      real saving, expect_saving;
      saving = 100.0 * (1.0 - real'(stream_cycles) / (3.28 * stream_words));
      // Saving implied by the group shares actually received.
      expect_saving = 100.0 * (1.0 - (real'(cnt_hold[1]) + 2.0 * cnt_hold[2] + 3.0 * cnt_hold[3]
                                      + 4.0 * cnt_hold[4]) / (3.28 * n_recv));
      checks += 2;
      if (saving < 29.5 || saving > 33.5) begin
        failures++; $display("FAIL saving %0.2f%% far from the published 31.5%% average", saving);
      end
      if (expect_saving < 29.5 || expect_saving > 33.5) begin
        failures++; $display("FAIL group shares imply a saving of %0.2f%%", expect_saving);
      end
      $display("[group mix] shares received (%%): g1 %0.2f g2 %0.2f g3 %0.2f g4 %0.2f g5 %0.2f g6 %0.2f",
               100.0 * cnt_group[1] / n_recv, 100.0 * cnt_group[2] / n_recv, 100.0 * cnt_group[3] / n_recv,
               100.0 * cnt_group[4] / n_recv, 100.0 * cnt_group[5] / n_recv, 100.0 * cnt_group[6] / n_recv);
    end
    $display("[BUS_INVERT=%0d] streaming: %0d words in %0d fast cycles; worst-case clocked bus: %0.1f fast cycles (%0.1f%% fewer)",
             BUS_INVERT, stream_words, stream_cycles, 3.28 * stream_words,
             100.0 * (1.0 - real'(stream_cycles) / (3.28 * stream_words)));
  end
endmodule
