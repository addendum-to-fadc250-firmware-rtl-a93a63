// pulse_proc: readout-window processing of one channel (data type 9).
//
// After a trigger the processor walks through the readout window of PTW
// samples that starts at address `base` of the channel's sample buffer,
// reading one sample per clock through a combinational read port:
//   1. PED    - the first N_PED samples (4..16) go through ped_sum: 14-bit
//               pedestal sum and quality bit, as for the asynchronous pedestal.
//   2. SEARCH - a pulse is found when N_SAMP_THR+1 consecutive samples (1..4)
//               lie above the readout threshold TET, taken from ADC count 0.
//               The first of them is the threshold sample t.  After a pulse
//               the search resumes behind its integration window and needs a
//               sample at or below TET before it can fire again.
//   3. PREV/FINE - samples t-1 and t give the coarse time (t, 9 bits) and a
//               6-bit fine time, the linear-interpolated crossing point of TET
//               between them in 1/64 of a sample.
//   4. INTEG  - the integral runs from t-NSB (NSB_SIGN=0) or t+NSB
//               (NSB_SIGN=1, "negative NSB") to t+NSA, cut at the window ends.
//               It also gives the time over threshold (samples above TET, 9
//               bits), the peak (largest sample) and the quality bits.
//   5. EMIT   - the pulse is stored; up to NP (1..3) pulses per window.
// `done` then holds the result until `ack`.  The configuration is captured at
// `start`.
// From the firmware addendum: the pedestal at the start of the window, NSB of
// 3 bits with its sign bit, the consecutive-sample threshold test, the
// time-over-threshold count and the field widths of the data type 9 words.
// This design's own choices: the sequential one-sample-per-clock walk, the
// fine-time interpolation, the re-arm rule, taking the largest sample as the
// peak, saturating the integral at 18 bits (integral quality bit 2), and the
// time quality bits (0: no fine time, 1: integration cut by the window end,
// 2: peak at ADC overflow).
// Timing: about N_PED + PTW + 2 clocks plus the integration windows.
module pulse_proc
  import fadc_pkg::*;
#(
  parameter int DEPTH = 2048,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  fadc_cfg_t     cfg,
  input  logic          start,
  input  logic [AW-1:0] base,
  output logic [AW-1:0] rd_addr,
  input  sample_t       rd_data,
  output logic          busy,
  output logic          done,
  input  logic          ack,
  output chan_result_t  result
);

  typedef enum logic [2:0] {
    S_IDLE, S_PED, S_SEARCH, S_PREV, S_FINE, S_INTEG, S_EMIT, S_DONE
  } state_t;

  state_t          state;
  fadc_cfg_t       c;
  logic [AW-1:0]   base_q;
  logic [10:0]     idx, t, k, kend;
  logic [2:0]      cnt;
  logic            armed;
  sample_t         prev;
  logic            prev_ok;
  logic [5:0]      fine;
  logic            cut;
  logic [20:0]     acc;
  logic [8:0]      tot;
  sample_t         peak;
  logic            uf, of;
  logic [1:0]      npulse;
  pulse_t [MAX_PULSES-1:0] pul;
  logic [13:0]     ped;
  logic            pq;

  // window geometry from the captured configuration
  logic [10:0] last, plen;
  logic [1:0]  np_eff;
  logic        above;

  always_comb begin
    if (c.ptw == 10'd0)                      last = 11'd0;
    else if (c.ptw > 10'(WIN_MAX))           last = 11'(WIN_MAX - 1);
    else                                     last = 11'(c.ptw) - 11'd1;
    plen   = (11'(ped_len(c.n_ped)) > last + 11'd1) ? last + 11'd1 : 11'(ped_len(c.n_ped));
    np_eff = (c.np == 2'd0) ? 2'd1 : c.np;
    above  = rd_data > c.tet;
  end

  always_comb begin
    unique case (state)
      S_PREV:  rd_addr = base_q + AW'(t - 11'd1);
      S_FINE:  rd_addr = base_q + AW'(t);
      S_INTEG: rd_addr = base_q + AW'(k);
      default: rd_addr = base_q + AW'(idx);
    endcase
  end

  ped_sum u_ped (
    .clk   (clk),
    .rst   (rst),
    .en    (state == S_PED),
    .first (idx == 11'd0),
    .sample(rd_data),
    .a_max (c.a_max),
    .sum   (ped),
    .qual  (pq)
  );

  // integration window of a threshold sample
  logic [10:0] kst_n, kend_n, tsa;
  logic [17:0] fnum;
  logic [11:0] fden;
  logic [17:0] fq;
  always_comb begin
    tsa    = t + 11'(c.nsa);
    kst_n  = c.nsb_sign ? t + 11'(c.nsb) : ((t >= 11'(c.nsb)) ? t - 11'(c.nsb) : 11'd0);
    kend_n = (tsa > last) ? last : tsa;
    fnum   = {c.tet - prev, 6'd0};
    fden   = rd_data - prev;
    fq     = (fden == 12'd0) ? 18'd0 : fnum / 18'(fden);
  end

  pulse_t newp;
  always_comb begin
    newp          = '0;
    newp.integral = (acc > 21'h3FFFF) ? 18'h3FFFF : acc[17:0];
    newp.iq       = {acc > 21'h3FFFF, of, uf};
    newp.tot      = tot;
    newp.coarse   = t[8:0];
    newp.fine     = fine;
    newp.peak     = peak;
    newp.tq       = {peak == ADC_OVERFLOW, cut, !prev_ok};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      c       <= '0;
      base_q  <= '0;
      idx     <= '0;
      t       <= '0;
      k       <= '0;
      kend    <= '0;
      cnt     <= '0;
      armed   <= 1'b0;
      prev    <= '0;
      prev_ok <= 1'b0;
      fine    <= '0;
      cut     <= 1'b0;
      acc     <= '0;
      tot     <= '0;
      peak    <= '0;
      uf      <= 1'b0;
      of      <= 1'b0;
      npulse  <= '0;
      pul     <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          c      <= cfg;
          base_q <= base;
          idx    <= '0;
          npulse <= '0;
          pul    <= '0;
          state  <= S_PED;
        end
        S_PED: begin
          if (idx == plen - 11'd1) begin
            idx   <= '0;
            cnt   <= '0;
            armed <= 1'b1;
            state <= S_SEARCH;
          end else idx <= idx + 11'd1;
        end
        S_SEARCH: begin
          if (!armed) begin
            if (!above) armed <= 1'b1;
          end else if (above) begin
            if (cnt == {1'b0, c.nsamp_thr}) begin
              t     <= idx - 11'(c.nsamp_thr);
              state <= S_PREV;
            end else cnt <= cnt + 3'd1;
          end else cnt <= '0;
          if (!(armed && above && cnt == {1'b0, c.nsamp_thr})) begin
            if (idx >= last) state <= S_DONE;
            else             idx   <= idx + 11'd1;
          end
        end
        S_PREV: begin
          prev    <= rd_data;
          prev_ok <= (t != 11'd0) && !(rd_data > c.tet);
          state   <= S_FINE;
        end
        S_FINE: begin
          fine  <= prev_ok ? fq[5:0] : 6'd0;
          kend  <= kend_n;
          k     <= kst_n;
          cut   <= tsa > last;
          acc   <= '0;
          tot   <= '0;
          peak  <= '0;
          uf    <= 1'b0;
          of    <= 1'b0;
          state <= (kst_n > kend_n) ? S_EMIT : S_INTEG;
        end
        S_INTEG: begin
          acc <= acc + 21'(rd_data);
          if (above && tot != 9'h1FF) tot <= tot + 9'd1;
          if (rd_data == ADC_UNDERFLOW) uf <= 1'b1;
          if (rd_data == ADC_OVERFLOW)  of <= 1'b1;
          if (rd_data > peak) peak <= rd_data;
          if (k == kend) state <= S_EMIT;
          else           k <= k + 11'd1;
        end
        S_EMIT: begin
          pul[npulse] <= newp;
          npulse      <= npulse + 2'd1;
          if (npulse + 2'd1 == np_eff || kend >= last) state <= S_DONE;
          else begin
            idx   <= kend + 11'd1;
            cnt   <= '0;
            armed <= 1'b0;
            state <= S_SEARCH;
          end
        end
        S_DONE: if (ack) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);

  always_comb begin
    result        = '0;
    result.ped    = ped;
    result.pq     = pq;
    result.npulse = npulse;
    result.p      = pul;
  end

endmodule
