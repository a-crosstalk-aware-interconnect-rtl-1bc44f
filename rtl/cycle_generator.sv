// cycle_generator: variable-cycle transmission control.
//
// A conventional bus clocks every transfer at the worst-case crosstalk delay.
// Here the wires run on a fast clock sized for a group-3 transition, and each
// word stays on the wires for as many fast cycles as its worst line needs:
// CYC_G123 (1) for groups 1-3, CYC_G4 (2), CYC_G5 (3) or CYC_G6 (4).
//
// Operation. A word waits one cycle in the sender latch while the analyzer
// classifies it against the word on the wires. When the wires are free, or in
// the last cycle of the word on them, the generator launches it: the output
// latch and the previous-data register load it and a down-counter loads the
// hold time minus one. Ready_Out is high in the last cycle of every word
// (continuously high for back-to-back one-cycle words), which tells the
// receiver that the wires have settled. The sender latch is refilled at the
// edge at which Ready_Out rises, i.e. while the receiver takes the previous
// word, so the analyzer's cycle overlaps the tail of the previous transfer and
// a stream of words loses no cycles. These waveforms (Data_Out one cycle
// after Data_In, Ready_Out in the last cycle, Data_In replaced when Ready_Out
// rises) follow the timing diagrams of the design; the counter and the
// pending/taken bookkeeping are this implementation's.
//
// Interface: rdy_lat is the latched Ready_In (the sender latch holds a word
// the sender offered); flags are the analyzer's groups for that word.
// launch enables the output latch and previous-data register; load_in
// enables the sender latch (the sender's word is taken at that edge when it
// offers one); ready_out is Ready_Out; busy marks a word on the wires.
module cycle_generator
  import xtalk_pkg::*;
#(
  parameter int unsigned C_G123 = CYC_G123,
  parameter int unsigned C_G4   = CYC_G4,
  parameter int unsigned C_G5   = CYC_G5,
  parameter int unsigned C_G6   = CYC_G6
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rdy_lat,
  input  grp_flags_t flags,
  output logic       launch,
  output logic       load_in,
  output logic       ready_out,
  output logic       busy
);

  localparam int unsigned CMAX = (C_G6 > C_G5) ? C_G6 : C_G5;
  localparam int unsigned CW   = $clog2(CMAX + 1);

  logic          b_valid_q, b_valid_d;   // a word is on the wires
  logic [CW-1:0] cnt_q, cnt_d;           // cycles left after this one
  logic          taken_q, taken_d;       // sender latch word already launched
  logic          pending, b_last;
  logic [CW-1:0] hold_m1;

  // Hold time of the word in the sender latch, minus one.
  always_comb begin
    unique case (worst_rank(flags))
      2'd3:    hold_m1 = CW'(C_G6   - 1);
      2'd2:    hold_m1 = CW'(C_G5   - 1);
      2'd1:    hold_m1 = CW'(C_G4   - 1);
      default: hold_m1 = CW'(C_G123 - 1);
    endcase
  end

  always_comb begin
    pending   = rdy_lat && !taken_q;
    b_last    = b_valid_q && (cnt_q == '0);
    launch    = pending && (!b_valid_q || b_last);

    b_valid_d = launch || (b_valid_q && !b_last);
    if (launch)                      cnt_d = hold_m1;
    else if (b_valid_q && !b_last)   cnt_d = cnt_q - 1'b1;
    else                             cnt_d = cnt_q;

    // Refill the sender latch when its word has gone (or was never there)
    // and the wires will be in their last cycle, or idle, next cycle.
    load_in   = !(pending && !launch) && (!b_valid_d || (cnt_d == '0));
    taken_d   = load_in ? 1'b0 : (taken_q || launch);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      b_valid_q <= 1'b0;
      cnt_q     <= '0;
      taken_q   <= 1'b0;
    end else begin
      b_valid_q <= b_valid_d;
      cnt_q     <= cnt_d;
      taken_q   <= taken_d;
    end
  end

  assign ready_out = b_last;
  assign busy      = b_valid_q;

  // A word never stays longer than the worst group allows.
  assert property (@(posedge clk) disable iff (!rst_n) cnt_q <= CW'(CMAX - 1));
  // Ready_Out only accompanies a word on the wires.
  assert property (@(posedge clk) disable iff (!rst_n) ready_out |-> busy);

endmodule
