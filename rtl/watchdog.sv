// watchdog: times out when the SSPLL takes too long to lock.
//
// While enabled it compares every newly written sample with the sample one
// frame (eight clocks) earlier, which is the same point of the pattern, and
// counts the clocks in which the two differ by more than TOL codes. When
// LIMIT such clocks have been counted, timeout goes high and stays high
// until the watchdog is disabled, which also clears the count. Counting
// unequal samples follows the published description; LIMIT (the largest 10-bit value) and TOL
// are this design's choices.
//
// Interface: en (the state machine's "waiting for lock"), mem from the
// sample memory, registered timeout.
module watchdog
  import afc_pkg::*;
#(
  parameter int unsigned LIMIT = 1023,
  parameter int unsigned TOL   = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  sample_mem_t mem,
  output logic        timeout
);

  localparam int unsigned CW = $clog2(LIMIT + 1);

  logic [CW-1:0] cnt;
  logic          differ;

  always_comb begin
    if (mem[0] > mem[FRAME_LEN]) differ = 32'(mem[0] - mem[FRAME_LEN]) > TOL;
    else                         differ = 32'(mem[FRAME_LEN] - mem[0]) > TOL;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           cnt <= '0;
    else if (!en)                         cnt <= '0;
    else if (differ && cnt != CW'(LIMIT)) cnt <= cnt + 1'b1;
  end

  assign timeout = (cnt == CW'(LIMIT));

endmodule
