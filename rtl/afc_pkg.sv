// afc_pkg: constants, types and the ideal-pattern function shared by the AFC
// digital core.
//
// The numbers are those of the 56 GHz design: N_aux = 7 auxiliary samples
// (so N_aux+1 = 8 samples per f_sync period), k = 5, a reference divider of
// 1 + k(N_aux+1) = 41 and a feedback divider of N_aux+1 = 8, 3-bit ADCs, a
// 48-bit sample memory, a 10-bit timing counter and a 4-bit coarse tuning
// word whose centre is 4'b1000.
//
// pattern_level() gives the ideal sample of an oscillator locked to a
// harmonic whose index modulo 8 is `m`, taken at sample position `j` with
// a static phase `p` (in 1/16 of an oscillator period). Because the sample
// clock advances by T_ref*(1/8 + k) per sample, sample j sees the phase
// m*j/8 of a period (plus p/16). The level is expressed in half-LSB units
// of a 3-bit ADC, 0..14, i.e. 7 + 7*sin(phase) rounded; ADC code c is
// compared as 2c+1, the centre of its input interval.
package afc_pkg;

  localparam int unsigned N_AUX       = 7;
  localparam int unsigned FRAME_LEN   = N_AUX + 1;          // samples per f_sync period
  localparam int unsigned K_PERIODS   = 5;
  localparam int unsigned REF_DIV     = 1 + K_PERIODS * FRAME_LEN; // 41
  localparam int unsigned FB_DIV      = FRAME_LEN;          // 8
  localparam int unsigned ADC_BITS    = 3;
  localparam int unsigned MEM_SAMPLES = 16;                 // 48 bits / 3 bits
  localparam int unsigned CNT_BITS    = 10;
  localparam int unsigned COARSE_BITS = 4;
  localparam int unsigned PHASE_STEPS = 16;                 // phase-correction resolution
  localparam int unsigned PHASE_BITS  = 4;
  localparam int          N_STATES    = 7;                  // harmonic states -3..+3

  typedef logic [ADC_BITS-1:0]     sample_t;
  typedef sample_t [MEM_SAMPLES-1:0] sample_mem_t;          // [0] is the newest sample
  typedef logic signed [2:0]       hstate_t;                // harmonic state -3..+3
  typedef logic [COARSE_BITS-1:0]  coarse_t;
  typedef logic [PHASE_BITS-1:0]   phase_t;

  typedef enum logic [2:0] {
    ST_SYNC        = 3'd0,   // wait for f_sync and two full frames
    ST_WAIT_LOCK   = 3'd1,   // watchdog running
    ST_CHARGE      = 3'd2,   // lock assist: slow linear search on V_cap
    ST_SETTLE      = 3'd3,   // wait for the loop filter to settle
    ST_DECODE      = 3'd4,   // decoder running
    ST_WAIT_UNLOCK = 3'd5    // idle in true lock, or waiting after a coarse step
  } afc_state_e;

  typedef struct packed {
    logic up;         // slow charge (bias-current controlled)
    logic down;       // slow discharge
    logic up_fast;    // fast charge
    logic down_fast;  // fast discharge
  } charge_cmd_t;

  // sin(2*pi*p/16) * 1000, p = 0..15
  function automatic int sin16(input int unsigned p);
    case (p % 16)
      0, 8:   return 0;
      1, 7:   return 383;
      2, 6:   return 707;
      3, 5:   return 924;
      4:      return 1000;
      9, 15:  return -383;
      10, 14: return -707;
      11, 13: return -924;
      default: return -1000;
    endcase
  endfunction

  // Ideal level (0..14, half-LSB units) of sample j for harmonic state m and phase p.
  function automatic logic [3:0] pattern_level(input int m, input int unsigned j,
                                                input int unsigned p);
    int ph;
    ph = ((2 * m * int'(j) + int'(p)) % 16 + 16) % 16;
    return 4'((7000 + 7 * sin16(ph) + 500) / 1000);
  endfunction

endpackage
