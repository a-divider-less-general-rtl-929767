// sspll_model: behavioural model of the analog surroundings of the AFC, for
// testbenches only: the 56 GHz SSPLL (oscillator with coarse bands and a
// fine control voltage), its loop capacitor with the charger, the replica
// sampler and the comparators of both flash ADCs.
//
// The oscillator frequency is kept as a harmonic number x = f_osc / f_ref:
//   x = X0 + x_off + (coarse - 8) * BAND + KV * (v_cap - 0.5)
// When x is within LOCKIN of an integer M the SSPLL is locked: the model
// moves v_cap so that x = M exactly (the loop pulls the capacitor). On every
// rising edge of the AFC clock the charger moves v_cap by SLOW (up/down) or
// FAST (up_fast/down_fast) volts, the oscillator phase advances by
// x * 41/8 periods (one AFC clock is 41/8 reference periods) and the
// sampler takes sin(2*pi*phase). While the SSPLL is locked its own sampler
// holds the oscillator at phase zero at the aligned reference edge, so the
// phase is set to PHI at the first clock edge after each falling edge of
// fsync (and once at start-up); PHI stands for the static phase error
// between the AFC sampler and the SSPLL's own sampler. The
// ADCs return thermometer codes.
// Outputs change just after the clock edge, as a clocked ADC's would.
module sspll_model #(
  parameter real X0     = 64.5,
  parameter real BAND   = 0.5,
  parameter real KV     = 2.0,
  parameter real LOCKIN = 0.02,
  parameter real SLOW   = 0.0005,
  parameter real FAST   = 0.01,
  parameter real PHI    = 0.125,
  parameter real V0     = 0.95
) (
  input  logic       clk,
  input  logic       fsync,
  input  logic [3:0] coarse,
  input  logic [3:0] charge_cmd,   // {up, down, up_fast, down_fast}
  output logic [6:0] sample_therm,
  output logic [6:0] charge_therm,
  output logic       pll_locked,
  output int         harmonic
);

  real v_cap = V0;
  real x_off = 0.0;
  real x;
  real ph = 0.0;
  bit  phase_set = 1'b0;
  bit  pll_locked_now;
  logic fsync_q = 1'b1;

  function automatic logic [6:0] therm_of(input int code);
    logic [6:0] t;
    for (int i = 0; i < 7; i++) t[i] = (code > i);
    return t;
  endfunction

  always @(posedge clk) begin
    real s;
    int  code, vcode, m;
    // charger
    if (charge_cmd[3]) v_cap += SLOW;
    if (charge_cmd[2]) v_cap -= SLOW;
    if (charge_cmd[1]) v_cap += FAST;
    if (charge_cmd[0]) v_cap -= FAST;
    if (v_cap < 0.0) v_cap = 0.0;
    if (v_cap > 1.0) v_cap = 1.0;
    // oscillator and loop
    x = X0 + x_off + (real'(coarse) - 8.0) * BAND + KV * (v_cap - 0.5);
    m = int'($floor(x + 0.5));
    if ((x - real'(m) < LOCKIN) && (real'(m) - x < LOCKIN)) begin
      v_cap = v_cap - (x - real'(m)) / KV;
      x = real'(m);
      pll_locked_now = 1'b1;
    end else begin
      pll_locked_now = 1'b0;
    end
    pll_locked <= pll_locked_now;
    harmonic <= m;
    // sampler phase
    if ((!phase_set || pll_locked_now) && fsync_q && !fsync) begin
      ph = PHI;
      phase_set = 1'b1;
    end else begin
      ph = ph + x * 41.0 / 8.0;
      ph = ph - $floor(ph);
    end
    fsync_q <= fsync;
    s = $sin(2.0 * 3.14159265358979 * ph);
    code = int'($floor(4.0 + 3.92 * s));
    if (code < 0) code = 0;
    if (code > 7) code = 7;
    vcode = int'($floor(v_cap * 8.0));
    if (vcode > 7) vcode = 7;
    sample_therm <= #1 therm_of(code);
    charge_therm <= #1 therm_of(vcode);
  end

endmodule
