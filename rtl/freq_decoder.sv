// freq_decoder: decodes the sampled pattern into the SSPLL's frequency state.
//
// A locked SSPLL runs at a harmonic M of the reference. Sample j of a frame
// sees the oscillator at phase M*j/8 of a period (plus a static offset), so
// the eight-sample pattern tells M modulo 8, which over the oscillator's
// 10 % tuning range identifies the harmonic: state m = -3..+3, where 0 is
// the wanted harmonic. The design calls for a many-to-one look-up table
// that maps every corrupted pattern back to the nearest valid one, plus a
// phase correction for static phase offsets, and for a self-calibration
// that finds that offset. A full table over 2^48 (or 2^21) patterns cannot
// be stored, so this design realises the same many-to-one mapping as a
// nearest-pattern search: each candidate's ideal pattern
// (afc_pkg::pattern_level) is compared with the captured samples, the sum of
// absolute differences over both frames of the memory is formed, and the
// candidate with the smallest sum wins (the first one on a tie).
//
// Two modes, chosen at start:
//   normal      (cal_mode = 0): 7 candidates, states -3..+3 at phase
//               phase_off; result in state. 7 clocks.
//   calibration (cal_mode = 1): the state is known (cal_state, the state of
//               the lowest coarse setting) and the 16 phase offsets are the
//               candidates; the best offset is returned in phase. 16 clocks.
//
// Interface: start must be given while mem holds an aligned frame (at
// frame_end); the memory is copied then. done pulses one clock after the
// last candidate, with state, phase and match_dist (the winning distance, in
// half-LSB units) valid from then until the next start. busy is high in
// between; a start while busy is ignored.
module freq_decoder
  import afc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        cal_mode,
  input  sample_mem_t mem,
  input  phase_t      phase_off,
  input  hstate_t     cal_state,
  output logic        busy,
  output logic        done,
  output hstate_t     state,
  output phase_t      phase,
  output logic [7:0]  match_dist
);

  sample_mem_t snap;
  logic        mode_cal;
  logic [3:0]  cand;
  logic [7:0]  best_dist, cand_dist;
  logic [3:0]  best_cand;
  int          cand_m;
  int unsigned cand_p;
  logic        last;
  logic [7:0]  nd;
  logic [3:0]  nc;
  logic [3:0]  lvl, smp, diff;

  always_comb begin
    if (mode_cal) begin
      cand_m = int'(cal_state);
      cand_p = int'(cand);
    end else begin
      cand_m = int'(cand) - 3;
      cand_p = int'(phase_off);
    end
    cand_dist = '0;
    for (int i = 0; i < int'(MEM_SAMPLES); i++) begin
      lvl = pattern_level(cand_m, N_AUX - (i % FRAME_LEN), cand_p);
      smp = {snap[i], 1'b1};                       // 2*code + 1
      diff = (smp > lvl) ? smp - lvl : lvl - smp;
      cand_dist = cand_dist + {4'd0, diff};
    end
    // running minimum including the current candidate
    if (cand == '0 || cand_dist < best_dist) begin
      nd = cand_dist;
      nc = cand;
    end else begin
      nd = best_dist;
      nc = best_cand;
    end
    last = mode_cal ? (cand == 4'(PHASE_STEPS - 1)) : (cand == 4'(N_STATES - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      snap      <= '0;
      mode_cal  <= 1'b0;
      cand      <= '0;
      best_dist <= '1;
      best_cand <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      state     <= '0;
      phase     <= '0;
      match_dist      <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          snap      <= mem;
          mode_cal  <= cal_mode;
          cand      <= '0;
          best_dist <= '1;
          busy      <= 1'b1;
        end
      end else begin
        best_dist <= nd;
        best_cand <= nc;
        cand      <= cand + 1'b1;
        if (last) begin
          busy <= 1'b0;
          done <= 1'b1;
          match_dist <= nd;
          if (mode_cal) begin
            state <= cal_state;
            phase <= nc;
          end else begin
            state <= hstate_t'(int'(nc) - 3);
            phase <= phase_off;
          end
        end
      end
    end
  end

endmodule
