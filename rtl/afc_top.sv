// afc_top: divider-less automatic frequency calibration and lock assist for
// a 56 GHz sub-sampling PLL (SSPLL), digital part with its clocking.
//
// An auxiliary charge-pump PLL makes the AFC clock f_clk = f_ref * 8/41
// (~170.7 MHz from 875 MHz): REFDIV divides the reference by 41 to give
// f_sync, FBDIV divides f_clk by 8, and the PFD compares the falling edges
// of the two. Its charge
// pump, loop filter and ring oscillator are analog and outside this module:
// pfd_up/pfd_dn go out to the charge pump and f_clk comes back in as clk.
// A replica of the SSPLL's sampler takes one sample of the 56 GHz
// oscillator per f_clk cycle; a 3-bit flash ADC digitises it, and a second
// one digitises the loop-capacitor voltage V_cap. Their comparators are
// analog too: their thermometer outputs are inputs here and the Wallace
// encoders turn them into codes for the digital core (afc_core), which
// steps the oscillator's coarse tuning word and drives the V_cap charger.
//
// Interface: ref_clk (f_ref), clk (f_clk from the auxiliary PLL), rst_n
// (asynchronous, active low, for both clock domains), the two thermometer
// codes, and out: fsync, fb_div, pfd_up/pfd_dn, coarse, charge_cmd and
// status. Timing: clk's rising edges must line up with the falling edges of
// fsync (which the auxiliary PLL ensures); fsync is resampled on clk's
// falling edge, giving half a clock period of margin either way.
module afc_top
  import afc_pkg::*;
(
  input  logic        ref_clk,
  input  logic        clk,
  input  logic        rst_n,
  input  logic [6:0]  sample_therm,
  input  logic [6:0]  charge_therm,
  output logic        fsync,
  output logic        fb_div,
  output logic        pfd_up,
  output logic        pfd_dn,
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

  sample_t sample_code, charge_code;

  clk_divider #(.DIV(REF_DIV)) u_refdiv (.clk_in(ref_clk), .rst_n, .clk_out(fsync));
  clk_divider #(.DIV(FB_DIV))  u_fbdiv  (.clk_in(clk),     .rst_n, .clk_out(fb_div));

  // The falling edges carry the timing, so the PFD compares those.
  logic fsync_n, fb_div_n;
  assign fsync_n  = ~fsync;
  assign fb_div_n = ~fb_div;

  pfd u_pfd (.ref_in(fsync_n), .fb_in(fb_div_n), .rst_n, .up(pfd_up), .dn(pfd_dn));

  wallace_encoder u_enc_sample (.therm(sample_therm), .code(sample_code));
  wallace_encoder u_enc_charge (.therm(charge_therm), .code(charge_code));

  afc_core u_core (
    .clk, .rst_n, .sync(fsync), .sample_code, .charge_code, .coarse, .charge_cmd,
    .state, .locked, .true_lock, .calibrating, .phase_off, .dec_state, .dec_done,
    .wd_timeout, .reversal, .slip, .frame_idx, .frame_equal, .sync_seen,
    .dec_busy, .dec_dist, .search_up
  );

endmodule
