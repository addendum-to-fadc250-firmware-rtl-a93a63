// trig_input: trigger input stage of the 16 channels.
//
// Produces, every clock, one hit bit per channel (sample above the trigger
// threshold) and the amplitudes passed on to the trigger energy sum.  The
// threshold is compared with the raw ADC code, without pedestal subtraction.
// It is either the common 12-bit threshold or, when trig_indiv is set, one
// 12-bit threshold per channel.  A channel whose trig_mask bit is 1 gives no
// hit bit and a zero amplitude, so it reaches neither the trigger nor the
// hit-bit scalers; its readout and asynchronous pedestal are not affected.
// All of this follows the firmware addendum; registering the outputs (one
// clock of latency) is this design's choice.
module trig_input
  import fadc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  sample_t [NCH-1:0] sample,
  input  logic [NCH-1:0]    trig_mask,
  input  sample_t           trig_thr,
  input  logic              trig_indiv,
  input  sample_t [NCH-1:0] thr_ch,
  output logic [NCH-1:0]    hit,
  output sample_t [NCH-1:0] trig_amp
);

  always_ff @(posedge clk) begin
    if (rst) begin
      hit      <= '0;
      trig_amp <= '0;
    end else begin
      for (int c = 0; c < NCH; c++) begin
        hit[c]      <= !trig_mask[c] && (sample[c] > (trig_indiv ? thr_ch[c] : trig_thr));
        trig_amp[c] <= trig_mask[c] ? sample_t'(0) : sample[c];
      end
    end
  end

endmodule
