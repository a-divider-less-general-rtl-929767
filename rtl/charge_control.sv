// charge_control: drives the SSPLL loop-capacitor charger.
//
// The charger has four switches: up/down for slow (bias-current limited)
// charging and up_fast/down_fast for fast charging. This block chooses
// among them from the 3-bit code of the capacitor voltage V_cap:
//   * V_cap out of bounds (code < VMIN or > VMAX): fast charge or discharge
//     back into the allowed range, whatever the state machine is doing.
//   * Lock assist on (assist_en) and V_cap in bounds: slow linear search.
//     The capacitor is charged in one direction until the code reaches the
//     edge of the allowed range (VMAX going up, VMIN going down), then the
//     direction reverses, so the control voltage sweeps back and forth.
//   * Otherwise all switches are open.
// The two charging speeds, the bounds check and the four switch controls
// follow the published description of this AFC; the bound codes, the
// reversal at the range edge and starting upwards are this design's
// choices. Each command bit is active high (1 = switch closed); driving
// the gates of the charger's transistors with the right polarity is left
// to the analog side.
//
// Interface: vcode is the charge ADC's code; cmd is registered (one clock
// after vcode/assist_en); dir_up is the current search direction; reversal
// pulses for one clock when the search direction turns.
module charge_control
  import afc_pkg::*;
#(
  parameter int unsigned VMIN = 1,
  parameter int unsigned VMAX = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        assist_en,
  input  sample_t     vcode,
  output charge_cmd_t cmd,
  output logic        dir_up,
  output logic        reversal
);

  charge_cmd_t cmd_next;
  logic        dir_next;

  always_comb begin
    cmd_next = '0;
    dir_next = dir_up;
    if (vcode < sample_t'(VMIN)) begin
      cmd_next.up_fast = 1'b1;
      dir_next         = 1'b1;
    end else if (vcode > sample_t'(VMAX)) begin
      cmd_next.down_fast = 1'b1;
      dir_next           = 1'b0;
    end else if (assist_en) begin
      if (dir_up && vcode >= sample_t'(VMAX))      dir_next = 1'b0;
      else if (!dir_up && vcode <= sample_t'(VMIN)) dir_next = 1'b1;
      cmd_next.up   = dir_next;
      cmd_next.down = ~dir_next;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd      <= '0;
      dir_up   <= 1'b1;
      reversal <= 1'b0;
    end else begin
      cmd      <= cmd_next;
      dir_up   <= dir_next;
      reversal <= assist_en & (dir_next != dir_up) &
                  (vcode >= sample_t'(VMIN)) & (vcode <= sample_t'(VMAX));
    end
  end

  initial assert (VMIN <= VMAX && VMAX < 8) else $error("charge_control: bad bounds");

endmodule
