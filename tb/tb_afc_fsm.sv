// tb_afc_fsm: drives the state machine's status inputs by script (with the
// real 10-bit counter) and checks each transition and output, with short
// SETTLE_CYCLES = 40 and STEP_WAIT = 30.
// Script: sync -> calibration coarse 0 -> unlocked -> watchdog timeout ->
// charge -> lock -> settle (>= 40 clocks, decode starts at a frame end) ->
// calibration decode (phase 5) -> centre word -> lock kept, step wait
// expires -> wait for lock -> settle -> decode state +1 -> coarse 8-2 = 6 ->
// unlock -> lock -> settle lost once -> decode state 0 -> true lock -> stays
// idle -> unlock leaves idle. Then two decodes of -3 step the word from 6
// to 12 and to 15 (clamped from 18).
`timescale 1ns/1ps
module tb_afc_fsm;
  import afc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic synced = 0, frame_end = 0, locked = 0, wd_timeout = 0, dec_done = 0;
  hstate_t dec_state = '0;
  phase_t dec_phase = '0;
  logic [CNT_BITS-1:0] count;
  afc_state_e state;
  coarse_t coarse;
  phase_t phase_off;
  logic calibrating, true_lock, assist_en, wd_en, cnt_clear, cnt_en, dec_start, dec_cal;
  int checks = 0, failures = 0;
  int cyc = 0;

  afc_fsm #(.SETTLE_CYCLES(40), .STEP_WAIT(30)) dut (
    .clk, .rst_n, .synced, .frame_end, .locked, .wd_timeout, .dec_done, .dec_state,
    .dec_phase, .count, .state, .coarse, .phase_off, .calibrating, .true_lock,
    .assist_en, .wd_en, .cnt_clear, .cnt_en, .dec_start, .dec_cal
  );
  counter10 u_cnt (.clk, .rst_n, .clear(cnt_clear), .en(cnt_en), .count);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    frame_end <= synced && (cyc % 8 == 7);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t %s (state %s)", $time, what, state.name()); end
  endtask

  // wait up to n clocks for a state; return the clocks waited
  task automatic wait_state(input afc_state_e s, input int n, output int waited);
    waited = 0;
    while (state != s && waited < n) begin
      @(posedge clk); #1;
      waited++;
    end
    check(state == s, $sformatf("expected %s", s.name()));
  endtask

  // give a decoder result when the FSM asks for one
  task automatic decode(input bit exp_cal, input hstate_t st, input phase_t ph);
    int w;
    check(dec_start, "no decoder start");
    check(frame_end, "decoder started outside a frame end");
    check(dec_cal == exp_cal, "decoder mode");
    @(posedge clk); #1;
    check(state == ST_DECODE, "not in DECODE");
    repeat (3) @(posedge clk);
    #1;
    dec_state = st; dec_phase = ph; dec_done = 1'b1;
    @(posedge clk); #1;
    dec_done = 1'b0;
    w = 0;
  endtask

  // wait for SETTLE -> DECODE and check the settle length
  task automatic settle(input bit exp_cal, input hstate_t st, input phase_t ph);
    int w, len;
    wait_state(ST_SETTLE, 50, w);
    len = 0;
    while (!dec_start && len < 200) begin
      @(posedge clk); #1;
      len++;
    end
    check(len >= 40 && len <= 49, $sformatf("settle took %0d clocks", len));
    decode(exp_cal, st, ph);
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w;
    #12 rst_n = 1'b1;
    @(posedge clk); #1;
    check(state == ST_SYNC && coarse == 4'b1000 && calibrating, "reset state");
    repeat (20) @(posedge clk);
    #1 check(state == ST_SYNC, "left SYNC without f_sync");
    synced = 1'b1;
    wait_state(ST_WAIT_UNLOCK, 40, w);
    check(coarse == 4'b0000, "calibration does not start at the lowest word");
    @(posedge clk); #1;
    check(state == ST_WAIT_LOCK && wd_en && !assist_en, "unlocked PLL not waited for");
    repeat (10) @(posedge clk);
    #1 wd_timeout = 1'b1;
    @(posedge clk); #1;
    check(state == ST_CHARGE && assist_en && !wd_en, "no lock assist after timeout");
    wd_timeout = 1'b0;
    repeat (30) @(posedge clk);
    #1 check(state == ST_CHARGE, "left CHARGE without lock");
    locked = 1'b1;
    settle(1'b1, -3'sd3, 4'd5);
    check(phase_off == 4'd5 && !calibrating && coarse == 4'b1000, "calibration result");
    check(state == ST_WAIT_UNLOCK, "no WAIT_UNLOCK after calibration");
    // lock kept across the coarse change: step wait expires
    wait_state(ST_WAIT_LOCK, 40, w);
    check(w >= 29, $sformatf("step wait only %0d clocks", w));
    settle(1'b0, 3'sd1, 4'd0);
    check(coarse == 4'b0110, $sformatf("coarse %b after state +1", coarse));
    check(!true_lock, "true lock after a wrong harmonic");
    @(posedge clk); #1;
    locked = 1'b0;
    wait_state(ST_WAIT_LOCK, 3, w);
    locked = 1'b1;
    wait_state(ST_SETTLE, 3, w);
    repeat (10) @(posedge clk);
    #1 locked = 1'b0;
    @(posedge clk); #1;
    check(state == ST_WAIT_LOCK, "lock lost during settle not noticed");
    locked = 1'b1;
    settle(1'b0, 3'sd0, 4'd0);
    check(true_lock && coarse == 4'b0110, "no true lock at state 0");
    repeat (200) @(posedge clk);
    #1 check(state == ST_WAIT_UNLOCK && true_lock, "left true lock while locked");
    locked = 1'b0;
    @(posedge clk); #1;
    check(state == ST_WAIT_LOCK && !true_lock, "unlock not noticed");
    // coarse clamp: walk the word up to 14 with two decodes of -3 (6 -> 12 -> 15)
    locked = 1'b1;
    settle(1'b0, -3'sd3, 4'd0);
    check(coarse == 4'd12, $sformatf("coarse %0d, expected 12", coarse));
    wait_state(ST_WAIT_LOCK, 40, w);
    settle(1'b0, -3'sd3, 4'd0);
    check(coarse == 4'd15, $sformatf("coarse %0d, expected 15 (clamped)", coarse));
    check(phase_off == 4'd5, "phase offset lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
