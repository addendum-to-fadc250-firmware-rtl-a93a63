// sample_ring: circular sample buffer of one channel.
//
// The ADC sample of every clock is written at the write pointer, which then
// advances, so the buffer always holds the last DEPTH samples.  A trigger
// that arrives PL clocks after a pulse finds it PL places behind the write
// pointer (the top computes that start address).  Two combinational read
// ports serve the pulse processor and the raw-window readout of mode 10.
// The firmware addendum does not describe this buffer; its depth (2048
// samples, about 8 us at 250 MHz) and the asynchronous reads are this
// design's choices.  A window must be processed before it is overwritten,
// i.e. PL + PTW plus the processing time must stay below DEPTH.
module sample_ring
  import fadc_pkg::*;
#(
  parameter int DEPTH = 2048,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  sample_t       din,
  output logic [AW-1:0] wptr,
  input  logic [AW-1:0] raddr_a,
  output sample_t       rdata_a,
  input  logic [AW-1:0] raddr_b,
  output sample_t       rdata_b
);

  sample_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) wptr <= '0;
    else     wptr <= wptr + 1'b1;
  end

  always_ff @(posedge clk) mem[wptr] <= din;

  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];

endmodule
