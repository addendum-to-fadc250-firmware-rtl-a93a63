// tb_fadc250_hd_top: end-to-end test of the whole core at its default sizes.
//
// A pre-generated stream of 16-channel samples (baseline noise, pulses of
// random height and shape, one-sample spikes, ADC underflows and overflows)
// drives the core for NCYC clocks.  The testbench
//   - checks the trigger hit bits and masked amplitudes every clock and the
//     hit-bit scalers at the end, against the stream and the trigger mask;
//   - issues sync_event from time to time and checks all 16 asynchronous
//     pedestal words against sums over the stream;
//   - issues triggers, some of them while the core is busy, and for every
//     accepted one computes with fadc_ref_pkg the complete list of words the
//     event must produce (block header, event header or its suppression,
//     raw windows in mode 10, hit headers, pulse words, block trailer), then
//     compares the output stream word by word under random back-pressure;
//   - switches between events among mode 9 and mode 10, the NSB sign,
//     header suppression, common and per-channel trigger thresholds and
//     window lengths up to 512 samples.
// Every mechanism is counted and a failure is counted for one that never
// happened.  No parameter of the top is overridden.
module tb_fadc250_hd_top;
  import fadc_pkg::*;
  import fadc_ref_pkg::*;

  localparam int NCYC = 40000;
  localparam int BL   = 3;

  logic                 clk = 0, rst = 1;
  fadc_cfg_t            cfg = '0;
  sample_t [NCH-1:0]    thr_ch = '0, adc = '0;
  logic [NCH-1:0]       hit;
  sample_t [NCH-1:0]    trig_amp;
  logic                 scaler_clear = 0;
  logic [NCH-1:0][31:0] scaler;
  logic                 sync_event = 0;
  logic [NCH-1:0][15:0] ped_word;
  logic                 ped_valid;
  logic                 trig = 0;
  logic [31:0]          dout;
  logic                 dout_valid, dout_ready = 0;
  logic                 busy;
  logic [15:0]          trig_lost;

  fadc250_hd_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_events = 0, n_lost = 0, n_multi = 0, n_neg = 0, n_supp = 0, n_raw = 0;
  int n_mode_sw = 0, n_trailer = 0, n_pq = 0, n_masked = 0, n_spike = 0;
  int n_stall = 0, n_ovf = 0, n_sync = 0, n_indiv = 0, n_full_win = 0;

  initial begin : watchdog
    repeat (NCYC + 200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sample_t hist [NCH][NCYC];
  logic [31:0] expq [$];

  // output stream checker
  always @(posedge clk) begin
    if (!rst && dout_valid) begin
      if (!dout_ready) n_stall++;
      else begin
        checks++;
        if (expq.size() == 0) begin
          failures++;
          $display("FAIL unexpected word %h", dout);
        end else begin
          logic [31:0] w;
          w = expq.pop_front();
          if (w !== dout) begin
            failures++;
            if (failures < 20) $display("FAIL word %h expected %h", dout, w);
          end
        end
      end
    end
  end

  always @(negedge clk) dout_ready <= ($urandom_range(0, 4) != 0);

  function automatic bit trig_above(int c, sample_t s, fadc_cfg_t cf, sample_t [NCH-1:0] tc);
    return s > (cf.trig_indiv ? tc[c] : cf.trig_thr);
  endfunction

  // stream generation
  task automatic gen_stream();
    for (int c = 0; c < NCH; c++) begin
      for (int k = 0; k < NCYC; k++) hist[c][k] = sample_t'($urandom_range(97, 103));
      for (int k = 0; k < NCYC; k++) begin
        int u = $urandom_range(0, 999);
        if (u < 10) begin
          int amp, rise, fall;
          amp  = ($urandom_range(0, 7) == 0) ? 6000 : $urandom_range(150, 2500);
          rise = $urandom_range(1, 3);
          fall = $urandom_range(4, 16);
          for (int i = 0; i < rise + fall && k + i < NCYC; i++) begin
            int v;
            v = int'(hist[c][k + i]) + ((i < rise) ? amp * (i + 1) / rise : amp * (rise + fall - i) / fall);
            hist[c][k + i] = (v > 4095) ? 12'hFFF : sample_t'(v);
          end
        end else if (u < 14) hist[c][k] = sample_t'($urandom_range(200, 260));  // one-sample spike
        else if (u < 15) hist[c][k] = 12'd0;                                     // underflow
      end
    end
  endtask

  // expected words of one accepted event
  int blk = 1, j_in_blk = 0, blk_words = 0;
  task automatic expect_event(int t, int evn, fadc_cfg_t cf);
    window_t win;
    bit multi = 0;
    int ptw;
    ptw = int'(cf.ptw);
    if (j_in_blk == 0) begin
      expq.push_back(pack_block_header(int'(cf.slot), blk, BL));
      blk_words = 1;
    end
    if (!cf.hdr_suppress || j_in_blk == 0) begin
      expq.push_back(pack_event_header(int'(cf.slot), t % 1024, evn % 4096));
      blk_words++;
    end else n_supp++;
    for (int c = 0; c < NCH; c++) begin
      chan_result_t r, r1;
      fadc_cfg_t c1;
      foreach (win[i]) win[i] = '0;
      for (int i = 0; i < ptw; i++) win[i] = hist[c][t - int'(cf.pl) + i];
      r = ref_window(win, cf);
      c1 = cf; c1.nsamp_thr = 2'd0;
      r1 = ref_window(win, c1);
      if (r1.npulse > r.npulse) n_spike++;
      if (cf.mode10) begin
        expq.push_back(pack_raw_header(c, ptw));
        blk_words++;
        for (int i = 0; i < ptw; i += 2) begin
          expq.push_back(pack_raw_data(win[i], win[i + 1], i + 1 < ptw));
          blk_words++;
        end
        n_raw++;
      end
      if (r.npulse != 0) begin
        expq.push_back(pack_hit_header(j_in_blk + 1, c, r.pq, int'(r.ped)));
        blk_words++;
        if (r.pq) n_pq++;
        if (r.npulse > 1) multi = 1;
        if (cf.nsb_sign) n_neg++;
        for (int k = 0; k < int'(r.npulse); k++) begin
          expq.push_back(pack_integral(r.p[k]));
          expq.push_back(pack_time(r.p[k]));
          blk_words += 2;
          if (r.p[k].iq[1]) n_ovf++;
        end
      end
    end
    if (multi) n_multi++;
    if (j_in_blk == BL - 1) begin
      expq.push_back(pack_block_trailer(int'(cf.slot), blk_words + 1));
      n_trailer++;
      blk++;
      j_in_blk = 0;
    end else j_in_blk++;
  endtask

  // state of the stimulus loop
  int accepted = 0, nped;
  int sc_exp [NCH];
  bit prev_above [NCH];
  logic [NCH-1:0] exp_hit;
  sample_t [NCH-1:0] exp_amp;
  bit prev_mode10 = 0;
  int next_trig = 300, next_sync = 200;
  int phase = 0;
  bit change_due = 0;

  initial begin
    gen_stream();
    foreach (sc_exp[c]) begin sc_exp[c] = 0; prev_above[c] = 0; end
    cfg.trig_mask   = 16'h0208;      // channels 3 and 9 kept out of the trigger
    cfg.trig_thr    = 12'd400;
    cfg.trig_indiv  = 1'b0;
    cfg.n_async_ped = 4'd7;          // 8 samples
    cfg.a_max       = 10'd180;
    cfg.n_ped       = 4'd5;          // 6 samples
    cfg.nsb         = 3'd3;
    cfg.nsb_sign    = 1'b0;
    cfg.nsa         = 9'd12;
    cfg.tet         = 12'd150;
    cfg.nsamp_thr   = 2'd1;          // 2 consecutive samples
    cfg.np          = 2'd3;
    cfg.pl          = 11'd50;
    cfg.ptw         = 10'd60;
    cfg.mode10      = 1'b0;
    cfg.hdr_suppress = 1'b1;
    cfg.slot        = 5'd4;
    cfg.block_level = 8'(BL);
    for (int c = 0; c < NCH; c++) thr_ch[c] = sample_t'(300 + 40 * c);
    nped = int'(cfg.n_async_ped) + 1;

    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < NCYC; k++) begin
      fadc_cfg_t cf_now;
      bit req;
      // configuration changes, only while no event is in flight
      if (k > 1000 && k % 1500 == 0) change_due = 1;
      if (change_due && !busy && expq.size() == 0) begin
        change_due = 0;
        phase++;
        cfg.mode10       = (phase % 3 == 2);
        cfg.nsb_sign     = (phase % 4 == 1);
        cfg.hdr_suppress = (phase % 2 == 0);
        cfg.trig_indiv   = (phase % 5 >= 2);
        cfg.ptw          = (phase == 3 || phase == 7) ? 10'd512 : 10'($urandom_range(20, 60));
        cfg.pl           = (cfg.ptw == 10'd512) ? 11'd600 : 11'd50;
        if (cfg.mode10 != prev_mode10) n_mode_sw++;
        prev_mode10 = cfg.mode10;
      end
      cf_now = cfg;
      if (cf_now.trig_indiv) n_indiv++;
      adc = '0;
      for (int c = 0; c < NCH; c++) adc[c] = hist[c][k];
      // triggers: one every few hundred clocks, sometimes a second one right after
      trig = 1'b0;
      if (k >= next_trig && k + 5000 < NCYC && k > int'(cfg.pl) + 600) begin
        trig = 1'b1;
        next_trig = k + (($urandom_range(0, 3) == 0) ? 3 : $urandom_range(200, 900));
      end
      if (trig) begin
        if (busy) n_lost++;
        else begin
          accepted++;
          expect_event(k, accepted, cf_now);
          if (cf_now.ptw == 10'd512) n_full_win++;
        end
      end
      req = (k >= next_sync);
      sync_event = req;
      if (req) next_sync = k + $urandom_range(100, 700);
      @(negedge clk);   // posedge k has happened
      // trigger inputs
      for (int c = 0; c < NCH; c++) begin
        bit a;
        a = trig_above(c, hist[c][k], cf_now, thr_ch);
        exp_hit[c] = a && !cf_now.trig_mask[c];
        exp_amp[c] = cf_now.trig_mask[c] ? sample_t'(0) : hist[c][k];
        if (a && cf_now.trig_mask[c]) n_masked++;
        if (exp_hit[c] && !prev_above[c]) sc_exp[c]++;
        prev_above[c] = exp_hit[c];
      end
      checks++;
      if (hit !== exp_hit || trig_amp !== exp_amp) begin
        failures++;
        if (failures < 20) $display("FAIL k=%0d hit %h expected %h", k, hit, exp_hit);
      end
      // asynchronous pedestal readout
      if (req && k > 2 * nped) begin
        int w;
        w = (k - 1) / nped - 1;
        n_sync++;
        for (int c = 0; c < NCH; c++) begin
          int sum;
          bit q;
          sum = 0; q = 0;
          for (int i = w * nped; i < w * nped + nped; i++) begin
            sum += (hist[c][i] > 1023) ? 1023 : int'(hist[c][i]);
            if (hist[c][i] > sample_t'(cfg.a_max) || hist[c][i] == 0) q = 1;
          end
          checks++;
          if (ped_word[c] !== {q, 1'b0, 14'(sum)}) begin
            failures++;
            if (failures < 20) $display("FAIL k=%0d async ped ch%0d %h expected %h", k, c, ped_word[c], {q, 1'b0, 14'(sum)});
          end
        end
      end
    end
    // drain
    trig = 0; sync_event = 0;
    while (busy || expq.size() != 0) @(negedge clk);
    repeat (5) @(negedge clk);
    n_events = accepted;
    // the scaler compares each hit bit with its previous value, so the last
    // clock's edge is counted one clock later: the drain above covers it
    for (int c = 0; c < NCH; c++) begin
      checks++;
      if (scaler[c] !== 32'(sc_exp[c])) begin
        failures++;
        $display("FAIL scaler ch%0d %0d expected %0d", c, scaler[c], sc_exp[c]);
      end
    end
    checks++;
    if (trig_lost !== 16'(n_lost)) begin
      failures++;
      $display("FAIL trig_lost %0d expected %0d", trig_lost, n_lost);
    end
    $display("events=%0d lost=%0d multi_pulse=%0d neg_nsb=%0d hdr_suppressed=%0d raw_windows=%0d",
             n_events, n_lost, n_multi, n_neg, n_supp, n_raw);
    $display("mode_switches=%0d trailers=%0d ped_quality=%0d masked=%0d spike_rejected=%0d",
             n_mode_sw, n_trailer, n_pq, n_masked, n_spike);
    $display("stalls=%0d adc_overflow=%0d sync_reads=%0d indiv_thr_clocks=%0d full_windows=%0d",
             n_stall, n_ovf, n_sync, n_indiv, n_full_win);
    if (n_events == 0)   begin failures++; $display("FAIL no event"); end
    if (n_lost == 0)     begin failures++; $display("FAIL no lost trigger"); end
    if (n_multi == 0)    begin failures++; $display("FAIL no multi-pulse window"); end
    if (n_neg == 0)      begin failures++; $display("FAIL no negative NSB pulse"); end
    if (n_supp == 0)     begin failures++; $display("FAIL no suppressed header"); end
    if (n_raw == 0)      begin failures++; $display("FAIL no mode 10 raw window"); end
    if (n_mode_sw == 0)  begin failures++; $display("FAIL no mode switch"); end
    if (n_trailer == 0)  begin failures++; $display("FAIL no block trailer"); end
    if (n_pq == 0)       begin failures++; $display("FAIL no pedestal quality bit"); end
    if (n_masked == 0)   begin failures++; $display("FAIL mask never used"); end
    if (n_spike == 0)    begin failures++; $display("FAIL no spike rejected"); end
    if (n_stall == 0)    begin failures++; $display("FAIL no back-pressure"); end
    if (n_ovf == 0)      begin failures++; $display("FAIL no ADC overflow in a pulse"); end
    if (n_sync == 0)     begin failures++; $display("FAIL no async pedestal read"); end
    if (n_indiv == 0)    begin failures++; $display("FAIL individual thresholds never used"); end
    if (n_full_win == 0) begin failures++; $display("FAIL no 512-sample window"); end
    checks += 16;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
