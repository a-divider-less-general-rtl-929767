// afc_core: the digital core of the automatic frequency calibration (AFC)
// and lock assist.
//
// Runs entirely on the ~170 MHz AFC clock. Every clock the 3-bit code of
// one sub-sample of the 56 GHz oscillator enters the 48-bit sample memory.
// frame_sync tells, from f_sync, where each frame of eight samples starts.
// From the memory the lock detector sees whether frames repeat (lock), the
// watchdog counts samples that do not repeat, and the decoder finds the
// harmonic the SSPLL is locked to. The state machine uses them, with the
// 10-bit counter for timing, to step the 4-bit coarse tuning word of the
// oscillator until the SSPLL locks to the wanted harmonic, and to turn on
// the lock assist (slow V_cap search) when lock takes too long. Independent
// of the state, charge_control pulls V_cap back with the fast charger when
// its ADC code leaves the allowed range. The partition into memory, lock
// detector, watchdog, decoder, state machine and 10-bit counter is the
// design's.
//
// Interface: sync (f_sync), sample_code (sampler ADC), charge_code (V_cap
// ADC); outputs coarse word, charger controls, state and status. Latency
// from a sample to its effect: see the individual blocks.
module afc_core
  import afc_pkg::*;
#(
  parameter int unsigned LOCK_FRAMES   = 4,
  parameter int unsigned WD_LIMIT      = 1023,
  parameter int unsigned SETTLE_CYCLES = 1023,
  parameter int unsigned STEP_WAIT     = 1023,
  parameter bit          CAL_EN        = 1'b1,
  parameter hstate_t     CAL_STATE     = -3'sd3,
  parameter int unsigned VMIN          = 1,
  parameter int unsigned VMAX          = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sync,
  input  sample_t     sample_code,
  input  sample_t     charge_code,
  output coarse_t     coarse,
  output charge_cmd_t charge_cmd,
  output afc_state_e  state,
  output logic        locked,
  output logic        true_lock,
  output logic        calibrating,
  output phase_t      phase_off,
  output hstate_t     dec_state,
  output logic        dec_done,
  output logic        wd_timeout,
  output logic        reversal,
  output logic        slip,
  output logic [2:0]  frame_idx,
  output logic        frame_equal,
  output logic        sync_seen,
  output logic        dec_busy,
  output logic [7:0]  dec_dist,
  output logic        search_up
);

  logic                frame_end, synced;
  sample_mem_t         mem;
  logic [CNT_BITS-1:0] count;
  logic                assist_en, wd_en, cnt_clear, cnt_en, dec_start, dec_cal;
  phase_t              dec_phase;

  frame_sync u_sync (
    .clk, .rst_n, .sync_in(sync), .idx(frame_idx), .frame_end, .synced, .sync_seen, .slip
  );

  sample_memory u_mem (
    .clk, .rst_n, .en(1'b1), .din(sample_code), .mem
  );

  lock_detector #(.LOCK_FRAMES(LOCK_FRAMES)) u_lock (
    .clk, .rst_n, .frame_end, .mem, .frame_equal, .locked
  );

  watchdog #(.LIMIT(WD_LIMIT)) u_wd (
    .clk, .rst_n, .en(wd_en), .mem, .timeout(wd_timeout)
  );

  freq_decoder u_dec (
    .clk, .rst_n, .start(dec_start), .cal_mode(dec_cal), .mem, .phase_off,
    .cal_state(CAL_STATE), .busy(dec_busy), .done(dec_done), .state(dec_state),
    .phase(dec_phase), .match_dist(dec_dist)
  );

  counter10 #(.WIDTH(CNT_BITS)) u_cnt (
    .clk, .rst_n, .clear(cnt_clear), .en(cnt_en), .count
  );

  afc_fsm #(
    .SETTLE_CYCLES(SETTLE_CYCLES), .STEP_WAIT(STEP_WAIT),
    .CAL_EN(CAL_EN)
  ) u_fsm (
    .clk, .rst_n, .synced, .frame_end, .locked, .wd_timeout, .dec_done,
    .dec_state, .dec_phase, .count, .state, .coarse, .phase_off, .calibrating,
    .true_lock, .assist_en, .wd_en, .cnt_clear, .cnt_en, .dec_start, .dec_cal
  );

  charge_control #(.VMIN(VMIN), .VMAX(VMAX)) u_chg (
    .clk, .rst_n, .assist_en, .vcode(charge_code), .cmd(charge_cmd), .dir_up(search_up),
    .reversal
  );

endmodule
