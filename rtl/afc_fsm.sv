// afc_fsm: the AFC state machine (coarse calibration and lock assist).
//
// States (afc_pkg::afc_state_e) and what moves between them:
//   SYNC        after reset: wait for f_sync and two full frames in the
//               memory, then set the coarse word (to CAL_COARSE, the
//               lowest setting, when self-calibration is on) -> WAIT_UNLOCK.
//   WAIT_LOCK   watchdog on. Lock -> SETTLE; watchdog timeout -> CHARGE.
//   CHARGE      lock assist: slow linear V_cap search. Lock -> SETTLE.
//   SETTLE      wait SETTLE_CYCLES for the loop filter to settle after
//               charging; lock lost -> WAIT_LOCK; then, at a frame end,
//               start the decoder -> DECODE.
//   DECODE      wait for the decoder. In self-calibration, store the phase
//               offset it found and set the coarse word to CENTER. Otherwise
//               compare the harmonic state with TARGET_STATE: equal means
//               true lock; else step the coarse word by
//               -(state - TARGET_STATE) * BANDS_PER_HARMONIC. -> WAIT_UNLOCK.
//   WAIT_UNLOCK idle while the PLL stays locked. Lock lost -> WAIT_LOCK.
//               After a coarse step, also -> WAIT_LOCK once STEP_WAIT cycles
//               have passed, in case the PLL re-locked without visibly
//               unlocking.
// The sequence wait-for-lock, charge, settle, decode, wait-for-unlock, the
// repetition until true lock, the search starting at the centre word and the
// self-calibration at the lowest setting follow the published description
// of this AFC. The timing
// constants, the coarse step rule (which, from the centre word, moves the
// search outwards by a distance set by the decoded harmonic error) and the
// STEP_WAIT escape are this design's choices.
//
// Interface: count/cnt_clear/cnt_en drive the shared 10-bit counter; all
// outputs are registered or decoded from the registered state.
module afc_fsm
  import afc_pkg::*;
#(
  parameter coarse_t     CENTER             = 4'b1000,
  parameter int unsigned BANDS_PER_HARMONIC = 2,
  parameter int unsigned SETTLE_CYCLES      = 1023,
  parameter int unsigned STEP_WAIT          = 1023,
  parameter bit          CAL_EN             = 1'b1,
  parameter coarse_t     CAL_COARSE         = 4'b0000,
  parameter hstate_t     TARGET_STATE       = 3'sd0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                synced,
  input  logic                frame_end,
  input  logic                locked,
  input  logic                wd_timeout,
  input  logic                dec_done,
  input  hstate_t             dec_state,
  input  phase_t              dec_phase,
  input  logic [CNT_BITS-1:0] count,
  output afc_state_e          state,
  output coarse_t             coarse,
  output phase_t              phase_off,
  output logic                calibrating,
  output logic                true_lock,
  output logic                assist_en,
  output logic                wd_en,
  output logic                cnt_clear,
  output logic                cnt_en,
  output logic                dec_start,
  output logic                dec_cal
);

  afc_state_e state_next;
  logic       step_pending;
  logic       go_wait_unlock_step;

  function automatic coarse_t step_coarse(input coarse_t c, input hstate_t s);
    int v;
    v = int'(c) - (int'(s) - int'(TARGET_STATE)) * int'(BANDS_PER_HARMONIC);
    if (v < 0) v = 0;
    if (v > (1 << COARSE_BITS) - 1) v = (1 << COARSE_BITS) - 1;
    return coarse_t'(v);
  endfunction

  always_comb begin
    state_next = state;
    cnt_clear  = 1'b0;
    dec_start  = 1'b0;
    go_wait_unlock_step = 1'b0;
    unique case (state)
      ST_SYNC: begin
        if (!synced) cnt_clear = 1'b1;
        else if (frame_end && count >= CNT_BITS'(2 * FRAME_LEN)) begin
          state_next = ST_WAIT_UNLOCK;
          go_wait_unlock_step = 1'b1;
          cnt_clear  = 1'b1;
        end
      end
      ST_WAIT_LOCK: begin
        if (locked) begin
          state_next = ST_SETTLE;
          cnt_clear  = 1'b1;
        end else if (wd_timeout) begin
          state_next = ST_CHARGE;
        end
      end
      ST_CHARGE: begin
        if (locked) begin
          state_next = ST_SETTLE;
          cnt_clear  = 1'b1;
        end
      end
      ST_SETTLE: begin
        if (!locked) begin
          state_next = ST_WAIT_LOCK;
        end else if (frame_end && count >= CNT_BITS'(SETTLE_CYCLES)) begin
          state_next = ST_DECODE;
          dec_start  = 1'b1;
        end
      end
      ST_DECODE: begin
        if (dec_done) begin
          state_next = ST_WAIT_UNLOCK;
          cnt_clear  = 1'b1;
        end
      end
      ST_WAIT_UNLOCK: begin
        if (!locked || (step_pending && count >= CNT_BITS'(STEP_WAIT))) begin
          state_next = ST_WAIT_LOCK;
        end
      end
      default: state_next = ST_SYNC;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= ST_SYNC;
      coarse       <= CENTER;
      phase_off    <= '0;
      calibrating  <= CAL_EN;
      step_pending <= 1'b0;
      true_lock    <= 1'b0;
    end else begin
      state <= state_next;
      if (go_wait_unlock_step) begin
        step_pending <= 1'b1;
        if (calibrating) coarse <= CAL_COARSE;
      end
      if (state == ST_DECODE && dec_done) begin
        if (calibrating) begin
          phase_off    <= dec_phase;
          calibrating  <= 1'b0;
          coarse       <= CENTER;
          step_pending <= 1'b1;
        end else if (dec_state == TARGET_STATE) begin
          true_lock    <= 1'b1;
          step_pending <= 1'b0;
        end else begin
          coarse       <= step_coarse(coarse, dec_state);
          step_pending <= 1'b1;
        end
      end
      if (state_next == ST_WAIT_LOCK && state != ST_WAIT_LOCK) begin
        true_lock    <= 1'b0;
        step_pending <= 1'b0;
      end
    end
  end

  always_comb begin
    assist_en = (state == ST_CHARGE);
    wd_en     = (state == ST_WAIT_LOCK);
    cnt_en    = (state == ST_SYNC) || (state == ST_SETTLE) || (state == ST_WAIT_UNLOCK);
    dec_cal   = calibrating;
  end

endmodule
