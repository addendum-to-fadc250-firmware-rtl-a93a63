// fadc250_hd_top: firmware core of a 16-channel 250 MHz flash ADC module.
//
// Every clock brings one 12-bit sample per channel.  Three paths use them:
//   - trigger: trig_input forms hit bits and masked amplitudes against raw
//     thresholds; the hit bits feed the hit-bit scalers, the amplitudes are
//     brought out for the trigger energy sum, which is not part of this core;
//   - monitoring: async_ped keeps pedestal sums of all channels, read out
//     together on sync_event;
//   - readout: each channel writes its samples into a sample_ring.  A trigger
//     accepted while the core is idle starts all 16 pulse_proc units on the
//     window PL samples back; when all are done, event_builder writes the
//     event into the output word stream (dout/dout_valid/dout_ready) and
//     releases the units.
// A trigger that arrives while an event is still being processed or written
// is not taken: it is counted in trig_lost and gets no event number.  The
// event number counts accepted triggers from 1; the trigger time is the low
// 10 bits of a free-running clock counter at the trigger.  Trigger buffering,
// the counters and the busy rule are this design's choices; the firmware
// addendum does not describe them.
module fadc250_hd_top
  import fadc_pkg::*;
#(
  parameter int DEPTH = 2048
) (
  input  logic                   clk,
  input  logic                   rst,
  input  fadc_cfg_t              cfg,
  input  sample_t [NCH-1:0]      thr_ch,
  input  sample_t [NCH-1:0]      adc,
  // trigger path
  output logic [NCH-1:0]         hit,
  output sample_t [NCH-1:0]      trig_amp,
  input  logic                   scaler_clear,
  output logic [NCH-1:0][31:0]   scaler,
  // asynchronous pedestal
  input  logic                   sync_event,
  output logic [NCH-1:0][15:0]   ped_word,
  output logic                   ped_valid,
  // triggered readout
  input  logic                   trig,
  output logic [31:0]            dout,
  output logic                   dout_valid,
  input  logic                   dout_ready,
  output logic                   busy,
  output logic [15:0]            trig_lost
);

  localparam int AW = $clog2(DEPTH);

  trig_input u_trig (
    .clk, .rst, .sample(adc), .trig_mask(cfg.trig_mask), .trig_thr(cfg.trig_thr),
    .trig_indiv(cfg.trig_indiv), .thr_ch, .hit, .trig_amp
  );

  hitbit_scaler #(.CW(32)) u_scaler (
    .clk, .rst, .clear(scaler_clear), .hit, .count(scaler)
  );

  async_ped u_aped (
    .clk, .rst, .sample(adc), .n_async_ped(cfg.n_async_ped), .a_max(cfg.a_max),
    .read_req(sync_event), .ped_word, .ped_valid
  );

  // readout control
  typedef enum logic [1:0] {T_IDLE, T_PROC, T_BUILD} tstate_t;
  tstate_t        tst;
  logic [AW-1:0]  wptr [NCH];
  logic [AW-1:0]  base;
  logic [31:0]    tclk;
  logic [11:0]    evnum;
  logic [9:0]     ttime;
  logic           pp_start;
  logic [NCH-1:0] pp_done, pp_busy;
  logic           eb_busy;
  logic           eb_start, eb_done;
  logic [9:0]     raw_idx;
  chan_result_t [NCH-1:0] res;
  sample_t [NCH-1:0]      raw_sample;

  always_ff @(posedge clk) begin
    if (rst) begin
      tst       <= T_IDLE;
      base      <= '0;
      tclk      <= '0;
      evnum     <= '0;
      ttime     <= '0;
      pp_start  <= 1'b0;
      eb_start  <= 1'b0;
      trig_lost <= '0;
    end else begin
      tclk     <= tclk + 32'd1;
      pp_start <= 1'b0;
      eb_start <= 1'b0;
      if (trig && tst != T_IDLE && trig_lost != '1) trig_lost <= trig_lost + 16'd1;
      unique case (tst)
        T_IDLE:  if (trig) begin
                   base     <= wptr[0] - AW'(cfg.pl);
                   ttime    <= tclk[9:0];
                   evnum    <= evnum + 12'd1;
                   pp_start <= 1'b1;
                   tst      <= T_PROC;
                 end
        T_PROC:  if (!pp_start && &pp_done) begin
                   eb_start <= 1'b1;
                   tst      <= T_BUILD;
                 end
        T_BUILD: if (eb_done) tst <= T_IDLE;
        default: tst <= T_IDLE;
      endcase
    end
  end

  assign busy = (tst != T_IDLE) || (|pp_busy) || eb_busy;

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    logic [AW-1:0] rd_addr;
    sample_t       rd_data;

    sample_ring #(.DEPTH(DEPTH)) u_ring (
      .clk, .rst, .din(adc[c]), .wptr(wptr[c]),
      .raddr_a(rd_addr), .rdata_a(rd_data),
      .raddr_b(base + AW'(raw_idx)), .rdata_b(raw_sample[c])
    );

    pulse_proc #(.DEPTH(DEPTH)) u_pp (
      .clk, .rst, .cfg, .start(pp_start), .base,
      .rd_addr, .rd_data, .busy(pp_busy[c]), .done(pp_done[c]),
      .ack(eb_done), .result(res[c])
    );
  end

  event_builder u_eb (
    .clk, .rst, .cfg, .start(eb_start), .evnum, .ttime, .res,
    .raw_idx, .raw_sample, .dout, .dout_valid, .dout_ready,
    .busy(eb_busy), .done(eb_done)
  );

endmodule
