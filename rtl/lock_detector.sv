// lock_detector: decides from the sample memory whether the SSPLL is locked.
//
// Once the SSPLL is locked to a harmonic of the reference, the pattern of
// samples repeats every f_sync period, so each frame of eight samples equals
// the one before it; an unlocked oscillator beats against the reference and
// the pattern drifts. At the end of every frame the detector compares the
// two frames in the 48-bit memory sample by sample, allowing a difference of
// up to TOL codes. It reports lock after LOCK_FRAMES equal frames in a row
// and drops lock at the first unequal frame. The principle (equal
// consecutive samples mean lock) follows the published description; frame-wise comparison,
// TOL and LOCK_FRAMES are this design's choices.
//
// Interface: frame_end (from frame_sync) marks the cycles where mem holds
// an aligned frame; frame_equal is the combinational comparison result;
// locked is registered and changes one clock after frame_end.
module lock_detector
  import afc_pkg::*;
#(
  parameter int unsigned LOCK_FRAMES = 4,
  parameter int unsigned TOL         = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        frame_end,
  input  sample_mem_t mem,
  output logic        frame_equal,
  output logic        locked
);

  localparam int unsigned CW = $clog2(LOCK_FRAMES + 1);

  logic [CW-1:0] eq_cnt;

  always_comb begin
    frame_equal = 1'b1;
    for (int i = 0; i < int'(FRAME_LEN); i++) begin
      if (mem[i] > mem[i+FRAME_LEN]) begin
        if (32'(mem[i] - mem[i+FRAME_LEN]) > TOL) frame_equal = 1'b0;
      end else begin
        if (32'(mem[i+FRAME_LEN] - mem[i]) > TOL) frame_equal = 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eq_cnt <= '0;
    end else if (frame_end) begin
      if (!frame_equal)                    eq_cnt <= '0;
      else if (eq_cnt != CW'(LOCK_FRAMES)) eq_cnt <= eq_cnt + 1'b1;
    end
  end

  assign locked = (eq_cnt == CW'(LOCK_FRAMES));

endmodule
