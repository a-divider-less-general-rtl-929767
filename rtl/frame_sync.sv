// frame_sync: aligns the AFC to the sampling frame given by f_sync.
//
// The AFC clock runs at f_ref*8/41, so its edges slide by T_ref/8 against
// the reference on every cycle and line up again every 8 cycles, at the
// falling edge of f_sync (from the auxiliary PLL's reference divider).
// The sample taken at that edge is sample 0 of a frame; samples 1..7 follow.
// The AFC cannot tell where in the frame it is without f_sync, so after
// reset it waits for a falling edge, and it re-aligns on every later one.
//
// f_sync changes at a rising edge of clk, so it is captured on the falling
// edge of clk first and then moved to the rising-edge domain: this leaves
// about half a clock period of setup and of hold margin. That edge choice
// follows the design's aim of equal setup and hold margins of 1/(2 f_clk);
// the exact pipeline is this design's own. It assumes the ADC delivers the
// code of a sample one clock after the sample is taken, so the code written
// into the sample memory at the edge where the falling f_sync is seen is
// sample 0.
//
// Interface: idx is the frame position of the sample written at the last
// edge (mem[0]); frame_end is high while mem[7:0] holds a complete frame
// (idx = 7 after the first f_sync edge); synced goes high at the first
// f_sync falling edge; sync_seen pulses for one cycle at every falling edge;
// slip pulses when a falling edge arrives elsewhere than at the end of a
// frame, i.e. when the alignment had to be corrected.
module frame_sync
  import afc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sync_in,
  output logic [2:0] idx,
  output logic       frame_end,
  output logic       synced,
  output logic       sync_seen,
  output logic       slip
);

  logic sync_neg, sync_pos, fall;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) sync_neg <= 1'b0;
    else        sync_neg <= sync_in;
  end

  assign fall = sync_pos & ~sync_neg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_pos  <= 1'b0;
      idx       <= 3'(N_AUX);
      synced    <= 1'b0;
      sync_seen <= 1'b0;
      slip      <= 1'b0;
    end else begin
      sync_pos  <= sync_neg;
      sync_seen <= fall;
      slip      <= fall & synced & (idx != 3'(N_AUX));
      if (fall) begin
        idx    <= '0;
        synced <= 1'b1;
      end else begin
        idx <= (idx == 3'(N_AUX)) ? '0 : idx + 1'b1;
      end
    end
  end

  assign frame_end = synced & (idx == 3'(N_AUX));

endmodule
