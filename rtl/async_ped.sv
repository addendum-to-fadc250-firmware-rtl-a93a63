// async_ped: asynchronous (trigger-independent) pedestal sums of 16 channels.
//
// A shared counter cuts the sample stream into back-to-back windows of
// N_ASYNC_PED samples (4..16, from the 4-bit register code, see ped_len).  One
// ped_sum per channel accumulates each window; when a window closes the sums
// of all channels are latched together.  A read request (issued at
// SYNC_EVENT, or by a register read) copies the latched values of all 16
// channels into the readout registers at once.  Each readout word holds the
// quality bit in bit 15 and the 14-bit sum in bits 13..0, bit 14 is 0.
// Windows, limit, sum width and bit 15 follow the firmware addendum; the
// back-to-back windows and the snapshot register are this design's choices.
// Timing: ped_valid rises after the first complete window; ped_word changes
// one clock after read_req.  A change of n_async_ped takes effect at the next
// window start.
module async_ped
  import fadc_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst,
  input  sample_t [NCH-1:0]      sample,
  input  logic [3:0]             n_async_ped,
  input  logic [9:0]             a_max,
  input  logic                   read_req,
  output logic [NCH-1:0][15:0]   ped_word,
  output logic                   ped_valid
);

  logic [4:0]              cnt, len;
  logic                    started;
  logic [NCH-1:0][13:0]    sum;
  logic [NCH-1:0]          qual;
  logic [NCH-1:0][15:0]    latched;

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    ped_sum u_sum (
      .clk   (clk),
      .rst   (rst),
      .en    (1'b1),
      .first (cnt == 5'd0),
      .sample(sample[c]),
      .a_max (a_max),
      .sum   (sum[c]),
      .qual  (qual[c])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= '0;
      len       <= 5'd4;
      started   <= 1'b0;
      ped_valid <= 1'b0;
      latched   <= '0;
      ped_word  <= '0;
    end else begin
      if (cnt == 5'd0) len <= ped_len(n_async_ped);
      if (cnt == 5'd0 && started) begin
        // the registered sums hold the window that just closed
        for (int c = 0; c < NCH; c++) latched[c] <= {qual[c], 1'b0, sum[c]};
        ped_valid <= 1'b1;
      end
      started <= 1'b1;
      if (cnt == 5'd0) cnt <= 5'd1;
      else             cnt <= (cnt == len - 5'd1) ? 5'd0 : cnt + 5'd1;
      if (read_req) ped_word <= latched;
    end
  end

endmodule
