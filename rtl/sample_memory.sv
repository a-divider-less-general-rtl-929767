// sample_memory: the 48-bit memory of the AFC digital core.
//
// A shift register that holds the 16 most recent 3-bit sample codes of the
// auxiliary sampler's ADC: two frames of N_aux+1 = 8 samples, i.e. the
// current and the previous f_sync period. All 48 bits are presented in
// parallel to the lock detector, the watchdog and the decoder, which compare
// or decode whole frames. The 48-bit width follows the published description; holding exactly
// two frames is this design's reading of it.
//
// Interface: clk, async active-low rst_n (clears all samples to 0), en
// shifts din in, mem[0] is the newest sample, mem[8] the sample one frame
// (eight clocks) earlier. The sample written at an edge is visible right
// after it.
module sample_memory
  import afc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  sample_t     din,
  output sample_mem_t mem
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  mem <= '0;
    else if (en) mem <= {mem[MEM_SAMPLES-2:0], din};
  end

endmodule
