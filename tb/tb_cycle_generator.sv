// tb_cycle_generator: cycle timing of the variable-cycle generator.
//
// The testbench plays the sender latch: at every edge where load_in is high
// it captures the next word of a list, if the sender offers one. Each word
// carries a random worst group (1-3, 4, 5 or 6) that is shown to the
// generator as its flags while the word sits in the latch. Checked:
//  - words are launched once each, in order;
//  - a word launched with hold time N (1, 2, 3, 4 cycles for groups 1-3, 4,
//    5, 6) keeps the wires N cycles and Ready_Out is high only in the last;
//  - with the sender always ready, the next word launches exactly N cycles
//    later (no lost cycles) and the sender latch reloads at the edge where
//    Ready_Out rises;
//  - with nothing offered, Ready_Out stays low.
module tb_cycle_generator;
  import xtalk_pkg::*;

  localparam int NWORDS = 400;
  logic clk = 0, rst_n;
  logic rdy_lat;
  grp_flags_t flags;
  logic launch, load_in, ready_out, busy;
  int checks = 0, failures = 0;

  int  grp[NWORDS];           // 0 = groups 1-3, 1..3 = group 4..6
  int  lat_idx;               // word held in the latch
  int  next_idx;              // next word the sender offers
  bit  offer;                 // sender offers a word this cycle
  bit  always_offer;
  int  launched;              // words launched so far
  int  cur_hold, cur_age;     // hold time and cycles elapsed of word on wires
  int  last_launch_cycle, cycle;
  int  cnt_hold[4];

  cycle_generator dut (.clk, .rst_n, .rdy_lat, .flags, .launch, .load_in, .ready_out, .busy);

  always #5 clk = ~clk;

  function automatic grp_flags_t flags_of(int g);
    grp_flags_t f;
    f.g4 = (g == 1); f.g5 = (g == 2); f.g6 = (g == 3);
    // lower groups may be present as well; the worst one must win
    if (g >= 2 && $urandom_range(0, 1) != 0) f.g4 = 1'b1;
    if (g == 3 && $urandom_range(0, 1) != 0) f.g5 = 1'b1;
    return f;
  endfunction

  // Flags of the word in the latch, stable for as long as it is there.
  grp_flags_t lat_flags;
  assign flags = lat_flags;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cycle++;
      // --- checks on the cycle that is ending ---
      if (busy) begin
        cur_age++;
        checks++;
        if (ready_out !== (cur_age == cur_hold)) begin
          failures++;
          $display("FAIL cycle %0d: ready_out=%b at age %0d of hold %0d", cycle, ready_out, cur_age, cur_hold);
        end
      end else begin
        checks++;
        if (ready_out) begin failures++; $display("FAIL ready_out while idle"); end
      end
      if (launch) begin
        checks++;
        if (busy && cur_age != cur_hold) begin
          failures++; $display("FAIL launch at age %0d of hold %0d", cur_age, cur_hold);
        end
        if (always_offer && launched > 0 && busy) begin
          checks++;
          if (cycle - last_launch_cycle != cur_hold) begin
            failures++; $display("FAIL streaming gap %0d, hold %0d", cycle - last_launch_cycle, cur_hold);
          end
        end
        checks++;
        if (lat_idx != launched) begin failures++; $display("FAIL launched word %0d, expected %0d", lat_idx, launched); end
        cur_hold = grp[lat_idx] + 1;
        cnt_hold[grp[lat_idx]]++;
        cur_age = 0;
        launched++;
        last_launch_cycle = cycle;
      end
      // Sender latch reload: with a word on the wires and N > 1 it must wait
      // for the edge at which Ready_Out rises (age N-1 of N).
      if (load_in && busy && !launch && !(cur_age == cur_hold)) begin
        checks++;
        if (cur_age != cur_hold - 1) begin
          failures++; $display("FAIL sender latch reloaded at age %0d of hold %0d", cur_age, cur_hold);
        end
      end
      // --- the sender latch itself ---
      if (load_in) begin
        if (offer && next_idx < NWORDS) begin
          lat_idx   <= next_idx;
          lat_flags <= flags_of(grp[next_idx]);
          rdy_lat   <= 1'b1;
          next_idx  <= next_idx + 1;
        end else begin
          rdy_lat   <= 1'b0;
        end
      end
      offer <= always_offer || ($urandom_range(0, 3) == 0);
    end
  end

  initial begin
    foreach (grp[i]) grp[i] = $urandom_range(0, 3);
    foreach (cnt_hold[i]) cnt_hold[i] = 0;
    rst_n = 0; rdy_lat = 0; lat_flags = '0; lat_idx = -1; next_idx = 0;
    offer = 0; always_offer = 0; launched = 0; cur_hold = 0; cur_age = 0;
    cycle = 0; last_launch_cycle = 0;
    repeat (3) @(posedge clk);
    // idle phase: nothing offered
    #1 rst_n = 1;
    repeat (10) @(posedge clk);
    // streaming phase, then a phase with random gaps
    always_offer = 1;
    offer = 1;
    wait (next_idx >= NWORDS / 2);
    always_offer = 0;
    wait (launched == NWORDS);
    repeat (6) @(posedge clk);
    for (int g = 0; g < 4; g++) begin
      checks++;
      if (cnt_hold[g] == 0) begin failures++; $display("FAIL hold %0d never used", g + 1); end
    end
    checks++;
    if (launched != NWORDS) failures++;
    $display("holds used: 1:%0d 2:%0d 3:%0d 4:%0d", cnt_hold[0], cnt_hold[1], cnt_hold[2], cnt_hold[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
