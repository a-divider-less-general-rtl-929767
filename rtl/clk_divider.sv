// clk_divider: integer clock divider of the auxiliary charge-pump PLL.
//
// Used twice: as REFDIV, dividing the 875 MHz reference by 1 + k(N_aux+1)
// = 41 to give f_sync (about 21.3 MHz), and as FBDIV, dividing the ~170 MHz
// AFC clock by N_aux+1 = 8 for the PFD. With both dividers the PLL locks to
// f_clk = f_ref * 8/41, which places successive AFC samples T_ref*(1/8 + 5)
// apart. Those ratios follow the published description; the counter is this design's own.
//
// The divided output is registered. It falls on the clock edge at which the
// counter wraps to zero and rises DIV - DIV/2 edges later, so it is low for
// (DIV+1)/2 input periods and high for DIV/2. Only the falling edge is used
// for timing (it starts a frame of samples); for an odd DIV the duty cycle
// cannot be 50 %, and does not need to be.
//
// Interface: clk_in, asynchronous active-low rst_n, clk_out. During reset
// the counter is 0 and clk_out low; the first falling edge comes DIV input
// edges after reset is released.
module clk_divider #(
  parameter int unsigned DIV = 41
) (
  input  logic clk_in,
  input  logic rst_n,
  output logic clk_out
);

  localparam int unsigned CW      = (DIV > 2) ? $clog2(DIV) : 1;
  localparam int unsigned LOW_LEN = (DIV + 1) / 2;

  logic [CW-1:0] cnt, cnt_next;

  always_comb cnt_next = (cnt == CW'(DIV - 1)) ? '0 : cnt + 1'b1;

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      clk_out <= 1'b0;
    end else begin
      cnt     <= cnt_next;
      clk_out <= (cnt_next >= CW'(LOW_LEN));
    end
  end

  initial assert (DIV >= 2) else $error("clk_divider: DIV must be at least 2");

endmodule
