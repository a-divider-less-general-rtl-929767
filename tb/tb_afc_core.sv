// tb_afc_core: the digital core alone, closed around the SSPLL model, with
// f_sync made directly by the testbench (falling 1 ns before every eighth
// clock edge) and short timing constants (watchdog 200, settle and step wait
// 100 clocks). The model starts at V_cap = 0.3 V with a static sampling
// phase of 5/16 period. Expected, from the model's numbers: calibration at
// the lowest word finds harmonic 61 (state -3) after a watchdog timeout and
// an upward search, and stores phase offset 5; the centre word then locks at
// harmonic 65 (state +1), one step of -2 gives word 6 and harmonic 64, and
// the core reports true lock there. Each decoded state is compared with
// the model's harmonic.
`timescale 1ns/1ps
module tb_afc_core;
  import afc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, sync = 1'b1;
  logic [6:0] sample_therm, charge_therm;
  sample_t sample_code, charge_code;
  coarse_t coarse;
  charge_cmd_t charge_cmd;
  afc_state_e state;
  logic locked, true_lock, calibrating, dec_done, wd_timeout, reversal, slip;
  phase_t phase_off;
  hstate_t dec_state;
  logic [2:0] frame_idx;
  logic frame_equal, sync_seen, dec_busy, search_up;
  logic [7:0] dec_dist;
  logic model_locked;
  int harmonic;
  int checks = 0, failures = 0;

  assign sample_code = sample_t'($countones(sample_therm));
  assign charge_code = sample_t'($countones(charge_therm));

  afc_core #(.WD_LIMIT(200), .SETTLE_CYCLES(100), .STEP_WAIT(100)) dut (
    .clk, .rst_n, .sync, .sample_code, .charge_code, .coarse, .charge_cmd, .state,
    .locked, .true_lock, .calibrating, .phase_off, .dec_state, .dec_done, .wd_timeout,
    .reversal, .slip, .frame_idx, .frame_equal, .sync_seen, .dec_busy, .dec_dist, .search_up
  );

  sspll_model #(.PHI(0.3125), .V0(0.3)) model (
    .clk, .fsync(sync), .coarse, .charge_cmd, .sample_therm, .charge_therm,
    .pll_locked(model_locked), .harmonic
  );

  always #20 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (cyc % 8 == 7) #39 sync = 1'b0;
    if (cyc % 8 == 3) #39 sync = 1'b1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t %s", $time, what); end
  endtask

  int n_dec = 0, n_wd = 0, n_charge = 0;
  afc_state_e prev = ST_SYNC;
  always @(posedge clk) if (rst_n) begin
    if (dec_done) begin
      int m;
      m = ((harmonic % 8) + 8) % 8;
      if (m > 4) m -= 8;
      n_dec++;
      check(int'(dec_state) == m, $sformatf("decoded %0d at harmonic %0d", dec_state, harmonic));
    end
    if (wd_timeout && state == ST_WAIT_LOCK) n_wd++;
    if (state == ST_CHARGE && prev != ST_CHARGE) n_charge++;
    prev <= state;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50 rst_n = 1'b1;
    while (!(true_lock && state == ST_WAIT_UNLOCK)) @(posedge clk);
    repeat (500) @(posedge clk);
    check(true_lock && state == ST_WAIT_UNLOCK, "true lock not kept");
    check(harmonic == 64 && model_locked, $sformatf("true lock at harmonic %0d", harmonic));
    check(coarse == 4'b0110, $sformatf("final coarse word %b", coarse));
    check(phase_off == 4'd5, $sformatf("phase offset %0d", phase_off));
    check(n_dec == 3, $sformatf("%0d decodes, expected 3", n_dec));
    check(n_wd > 0 && n_charge > 0, "no lock assist");
    check(!calibrating, "still calibrating");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
