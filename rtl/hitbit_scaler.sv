// hitbit_scaler: one 32-bit scaler per channel counting hit-bit pulses.
//
// A count is a rising edge of the channel's hit bit, so a pulse that stays
// over threshold for several samples counts once.  The hit bits come from
// trig_input, where masked channels are already forced to 0, which is how the
// trigger mask disables the scalers as the firmware addendum asks.  Counting
// edges, the 32-bit width, saturation at the top and the synchronous clear
// are this design's choices.  Timing: a count is visible one clock after the
// edge it belongs to.
module hitbit_scaler
  import fadc_pkg::*;
#(
  parameter int CW = 32
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   clear,
  input  logic [NCH-1:0]         hit,
  output logic [NCH-1:0][CW-1:0] count
);

  logic [NCH-1:0] hit_q;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      hit_q <= '0;
      count <= '0;
    end else begin
      hit_q <= hit;
      for (int c = 0; c < NCH; c++)
        if (hit[c] && !hit_q[c] && count[c] != '1)
          count[c] <= count[c] + 1'b1;
    end
  end

endmodule
