// fadc_pkg: types and constants shared by the FADC250 Hall D firmware core.
//
// Holds the channel count, the sample format, the programmable register set
// (fadc_cfg_t), the per-pulse and per-channel result records produced by the
// readout pulse processor, and the 32-bit data word codes.  The register
// widths follow the register summary of the firmware addendum (NSB 3 bits plus
// a sign bit, N_PED / N_ASYNC_PED 4 bits, A_MAX 10 bits, N_SAMP_THR 2 bits,
// 16-bit trigger mask, 12-bit trigger thresholds).  Registers the addendum
// does not list (NSA, PTW, PL, number of pulses, block level, slot) have
// widths chosen here to fit the data format: the 9-bit coarse time limits the
// readout window to 512 samples.
package fadc_pkg;

  localparam int NCH        = 16;   // channels per module
  localparam int SW         = 12;   // ADC sample width
  localparam int MAX_PULSES = 3;    // pulses reported per channel and window
  localparam int WIN_MAX    = 512;  // longest readout window (9-bit coarse time)

  typedef logic [SW-1:0] sample_t;

  // ADC codes taken as underflow / overflow of the converter.
  localparam sample_t ADC_UNDERFLOW = '0;
  localparam sample_t ADC_OVERFLOW  = '1;

  // Data type codes (bits 30..27 of a header word).
  localparam logic [3:0] DT_BLOCK_HEADER  = 4'd0;
  localparam logic [3:0] DT_BLOCK_TRAILER = 4'd1;
  localparam logic [3:0] DT_EVENT_HEADER  = 4'd2;
  localparam logic [3:0] DT_WINDOW_RAW    = 4'd4;
  localparam logic [3:0] DT_PULSE         = 4'd9;
  localparam logic [3:0] DT_EXTENSION     = 4'd11;

  typedef struct packed {
    // trigger path
    logic [NCH-1:0] trig_mask;     // 1 = channel excluded from trigger and hit-bit scalers
    logic [SW-1:0]  trig_thr;      // common trigger threshold, w.r.t. ADC count 0
    logic           trig_indiv;    // 1 = use the per-channel thresholds instead
    // asynchronous pedestal
    logic [3:0]     n_async_ped;   // window length code, see ped_len()
    logic [9:0]     a_max;         // pedestal amplitude limit, w.r.t. ADC count 0
    // triggered readout
    logic [3:0]     n_ped;         // window length code, see ped_len()
    logic [2:0]     nsb;           // samples before (or after) the threshold sample
    logic           nsb_sign;      // 0 = integral starts before, 1 = after threshold sample
    logic [8:0]     nsa;           // samples after the threshold sample
    logic [SW-1:0]  tet;           // readout threshold, w.r.t. ADC count 0
    logic [1:0]     nsamp_thr;     // 0..3 = 1..4 consecutive samples over threshold
    logic [1:0]     np;            // pulses per window, 1..3 (0 counts as 1)
    logic [10:0]    pl;            // trigger latency in samples
    logic [9:0]     ptw;           // readout window in samples, 1..512
    // data format
    logic           mode10;        // 0 = mode 9 (production), 1 = mode 10 (adds raw window)
    logic           hdr_suppress;  // 1 = event header only for the first event of a block
    logic           hdr_ext;       // 1 = event header carries the data type field
    logic           hdr_ext_bit;   // format extension bit written in that header
    logic [3:0]     hdr_dtype;     // data type written in that header
    logic [4:0]     slot;          // VME slot number
    logic [7:0]     block_level;   // events per block, 0 = 256
  } fadc_cfg_t;

  typedef struct packed {
    logic [17:0] integral;
    logic [2:0]  iq;        // 0 underflow used, 1 overflow used, 2 sum overflow
    logic [8:0]  tot;       // samples over threshold in the integration window
    logic [8:0]  coarse;    // threshold sample index in the window
    logic [5:0]  fine;      // threshold crossing position inside the sample, /64
    logic [11:0] peak;
    logic [2:0]  tq;        // 0 no fine time, 1 window cut at end, 2 peak overflow
  } pulse_t;

  typedef struct packed {
    logic [13:0]                  ped;
    logic                         pq;
    logic [1:0]                   npulse;
    pulse_t [MAX_PULSES-1:0]      p;
  } chan_result_t;

  // Pedestal window length for a 4-bit register code: code+1 samples,
  // limited to the specified 4..16 range.
  function automatic logic [4:0] ped_len(input logic [3:0] code);
    return (code < 4'd3) ? 5'd4 : 5'({1'b0, code} + 5'd1);
  endfunction

  // Word formats of the data stream.
  function automatic logic [31:0] w_block_header(input logic [4:0] slot,
                                                 input logic [9:0] block_num,
                                                 input logic [7:0] nevents);
    return {1'b1, DT_BLOCK_HEADER, slot, 4'd0, block_num, nevents};
  endfunction

  function automatic logic [31:0] w_block_trailer(input logic [4:0] slot,
                                                  input logic [21:0] nwords);
    return {1'b1, DT_BLOCK_TRAILER, slot, nwords};
  endfunction

  function automatic logic [31:0] w_event_header(input fadc_cfg_t cfg,
                                                 input logic [9:0] ttime,
                                                 input logic [11:0] evnum);
    if (cfg.hdr_ext)
      return {1'b1, DT_EVENT_HEADER, cfg.hdr_ext_bit, cfg.hdr_dtype, ttime, evnum};
    else
      return {1'b1, DT_EVENT_HEADER, cfg.slot, ttime, evnum};
  endfunction

  function automatic logic [31:0] w_hit_header(input logic [7:0] evnum,
                                               input logic [3:0] ch,
                                               input logic pq,
                                               input logic [13:0] ped);
    return {1'b1, DT_PULSE, evnum, ch, pq, ped};
  endfunction

  function automatic logic [31:0] w_integral(input pulse_t p);
    return {1'b0, 1'b1, p.integral, p.iq, p.tot};
  endfunction

  function automatic logic [31:0] w_time(input pulse_t p);
    return {1'b0, 1'b0, p.coarse, p.fine, p.peak, p.tq};
  endfunction

  function automatic logic [31:0] w_raw_header(input logic [3:0] ch,
                                               input logic [9:0] ptw);
    return {1'b1, DT_WINDOW_RAW, ch, 11'd0, 2'd0, ptw};
  endfunction

  // Two 13-bit sample fields per word (bits 28..16 and 12..0), each a 12-bit
  // sample under a zero bit; bits 29 and 13 mark a field not valid.
  function automatic logic [31:0] w_raw_data(input sample_t a, input sample_t b,
                                             input logic b_valid);
    return {4'b0000, a, 2'b00, ~b_valid, 1'b0, b_valid ? b : sample_t'(0)};
  endfunction

endpackage
