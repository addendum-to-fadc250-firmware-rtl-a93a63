// ped_sum: one pedestal accumulator.
//
// Each sample taken (en=1) is limited to the 10-bit range 0..1023 and added
// to a 14-bit sum; 16 samples of 1023 fit exactly.  The quality bit is set
// when a sample lies above the amplitude limit a_max (measured from ADC count
// 0, no baseline subtracted) or is an ADC underflow (code 0).  first=1 with
// en=1 starts a new sum with the current sample.  The window length is kept
// by the user of this unit: the asynchronous pedestal counts it for all 16
// channels together, the readout pulse processor at the start of its window.
// Clipping, the 14-bit sum, the limit and the quality bit follow the firmware
// addendum; taking code 0 as the underflow indication is this design's choice.
// Timing: sum and quality are registered, valid one clock after the last sample.
module ped_sum
  import fadc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic        first,
  input  sample_t     sample,
  input  logic [9:0]  a_max,
  output logic [13:0] sum,
  output logic        qual
);

  logic [9:0] amp;
  logic       bad;

  always_comb begin
    amp = (sample > sample_t'(1023)) ? 10'd1023 : sample[9:0];
    bad = (sample > sample_t'(a_max)) || (sample == ADC_UNDERFLOW);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sum  <= '0;
      qual <= 1'b0;
    end else if (en) begin
      sum  <= (first ? 14'd0 : sum) + 14'(amp);
      qual <= (first ? 1'b0 : qual) | bad;
    end
  end

endmodule
