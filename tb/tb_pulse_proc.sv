// tb_pulse_proc: self-checking test of the readout-window pulse processor.
// A testbench memory stands in for the channel's sample buffer.  Each round
// draws a random configuration (NSB and its sign, NSA, threshold, 1..4
// consecutive samples, 1..3 pulses, N_PED, window length) and a random window
// with baseline noise, pulses, short spikes, ADC underflows and overflows,
// placed at a random, possibly wrapping, buffer address.  A reference model
// written here computes pedestal, pulses, integrals, time over threshold,
// peak, coarse and fine time and all quality bits; the result at `done` must
// match it.  The number of clocks from start to done is checked against the
// one-sample-per-clock walk.
module tb_pulse_proc;
  import fadc_pkg::*;

  localparam int DEPTH = 2048;
  localparam int AW = 11;

  logic          clk = 0, rst = 1, start = 0, ack = 0;
  fadc_cfg_t     cfg = '0;
  logic [AW-1:0] base = '0, rd_addr;
  sample_t       rd_data;
  logic          busy, done;
  chan_result_t  result;
  int checks = 0, failures = 0;
  int n_multi = 0, n_neg = 0, n_cut = 0, n_sat = 0, n_nothr = 0, n_empty = 0;

  sample_t mem [DEPTH];
  assign rd_data = mem[rd_addr];

  pulse_proc #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sample_t win [WIN_MAX];

  // reference model; returns the expected number of clocks from start to done
  function automatic int model(input fadc_cfg_t c, output chan_result_t r);
    int last, plen, np, nthr, pos, cyc, psum;
    bit pq, rearm;
    r = '0;
    last = (c.ptw == 0) ? 0 : ((int'(c.ptw) > WIN_MAX) ? WIN_MAX - 1 : int'(c.ptw) - 1);
    plen = (c.n_ped < 3) ? 4 : int'(c.n_ped) + 1;
    if (plen > last + 1) plen = last + 1;
    np   = (c.np == 0) ? 1 : int'(c.np);
    nthr = int'(c.nsamp_thr);
    psum = 0; pq = 0;
    for (int i = 0; i < plen; i++) begin
      psum += (win[i] > 1023) ? 1023 : int'(win[i]);
      if (win[i] > sample_t'(c.a_max) || win[i] == 0) pq = 1;
    end
    r.ped = 14'(psum); r.pq = pq;
    cyc = 1 + plen;       // start capture, pedestal walk
    pos = 0; rearm = 0;
    while (int'(r.npulse) < np) begin
      int i, t, kst, kend, acc, tot, peak;
      bit found, prev_ok, uf, of;
      pulse_t p;
      i = pos;
      if (rearm) while (i <= last && win[i] > c.tet) i++;
      found = 0; t = 0;
      for (int s = i; s + nthr <= last && !found; s++) begin
        bit ok;
        ok = (s == i) || !(win[s - 1] > c.tet);
        for (int j = s; j <= s + nthr; j++) if (!(win[j] > c.tet)) ok = 0;
        if (ok) begin found = 1; t = s; end
      end
      if (!found) begin
        cyc += (last - pos + 1);
        break;
      end
      cyc += (t + nthr - pos + 1) + 2;
      prev_ok = (t > 0) && !(win[t - 1] > c.tet);
      p = '0;
      p.coarse = 9'(t);
      p.fine = prev_ok ? 6'(((int'(c.tet) - int'(win[t - 1])) * 64) / (int'(win[t]) - int'(win[t - 1]))) : 6'd0;
      kst  = c.nsb_sign ? t + int'(c.nsb) : ((t >= int'(c.nsb)) ? t - int'(c.nsb) : 0);
      kend = (t + int'(c.nsa) > last) ? last : t + int'(c.nsa);
      acc = 0; tot = 0; peak = 0; uf = 0; of = 0;
      for (int k = kst; k <= kend; k++) begin
        acc += int'(win[k]);
        if (win[k] > c.tet) tot++;
        if (win[k] == 0) uf = 1;
        if (win[k] == 4095) of = 1;
        if (int'(win[k]) > peak) peak = int'(win[k]);
      end
      if (kst <= kend) cyc += kend - kst + 1;
      cyc += 1;           // emit
      if (tot > 511) tot = 511;
      p.integral = (acc > 262143) ? 18'h3FFFF : 18'(acc);
      p.iq = {acc > 262143, of, uf};
      p.tot = 9'(tot);
      p.peak = 12'(peak);
      p.tq = {peak == 4095, (t + int'(c.nsa) > last), !prev_ok};
      r.p[r.npulse] = p;
      r.npulse++;
      if (kend >= last) break;
      pos = kend + 1;
      rearm = 1;
    end
    return cyc;
  endfunction

  task automatic make_window(input int ptw, input fadc_cfg_t c);
    int npl;
    for (int i = 0; i < ptw; i++) win[i] = sample_t'($urandom_range(95, 105));
    npl = $urandom_range(0, 4);
    for (int k = 0; k < npl; k++) begin
      int t0, amp, rise, fall;
      t0   = $urandom_range(0, ptw - 1);
      amp  = ($urandom_range(0, 9) == 0) ? 6000 : $urandom_range(100, 3000);
      rise = $urandom_range(1, 4);
      fall = $urandom_range(3, 20);
      for (int i = 0; i < rise + fall; i++) begin
        int v;
        if (t0 + i >= ptw) break;
        v = (i < rise) ? amp * (i + 1) / rise : amp * (rise + fall - i) / fall;
        v += int'(win[t0 + i]);
        win[t0 + i] = (v > 4095) ? 12'hFFF : sample_t'(v);
      end
    end
    // short spikes and underflows
    for (int i = 0; i < ptw; i++) begin
      int u = $urandom_range(0, 199);
      if (u == 0) win[i] = sample_t'(int'(c.tet) + $urandom_range(1, 50));
      else if (u == 1) win[i] = 0;
    end
  endtask

  initial begin
    chan_result_t exp_r;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int round = 0; round < 600; round++) begin
      fadc_cfg_t c;
      int ptw, exp_cyc, cyc, b;
      c = '0;
      ptw         = (round % 10 == 0) ? WIN_MAX : $urandom_range(8, 150);
      c.ptw       = 10'(ptw);
      c.n_ped     = 4'($urandom_range(0, 15));
      c.a_max     = 10'($urandom_range(100, 1023));
      c.nsb       = 3'($urandom_range(0, 7));
      c.nsb_sign  = ($urandom_range(0, 3) == 0);
      c.nsa       = 9'($urandom_range(0, 40));
      c.tet       = 12'($urandom_range(110, 400));
      c.nsamp_thr = 2'($urandom_range(0, 3));
      c.np        = 2'($urandom_range(0, 3));
      make_window(ptw, c);
      b = $urandom_range(0, DEPTH - 1);
      for (int i = 0; i < ptw; i++) mem[(b + i) % DEPTH] = win[i];
      exp_cyc = model(c, exp_r);
      cfg = c; base = AW'(b); start = 1;
      @(negedge clk);
      start = 0; cfg = '0;
      cyc = 1;
      while (!done && cyc < 5000) begin @(negedge clk); cyc++; end
      checks++;
      if (result !== exp_r) begin
        failures++;
        $display("FAIL round %0d: npulse %0d exp %0d ped %0d/%0d", round, result.npulse, exp_r.npulse, result.ped, exp_r.ped);
        for (int k = 0; k < MAX_PULSES; k++)
          $display("  p%0d got %h exp %h", k, result.p[k], exp_r.p[k]);
      end
      checks++;
      if (cyc != exp_cyc) begin
        failures++;
        $display("FAIL round %0d: %0d clocks, expected %0d", round, cyc, exp_cyc);
      end
      if (exp_r.npulse > 1) n_multi++;
      if (c.nsb_sign && exp_r.npulse > 0) n_neg++;
      for (int k = 0; k < int'(exp_r.npulse); k++) begin
        if (exp_r.p[k].tq[1]) n_cut++;
        if (exp_r.p[k].iq[1]) n_sat++;
        if (exp_r.p[k].tq[0]) n_nothr++;
      end
      if (exp_r.npulse == 0) n_empty++;
      ack = 1;
      @(negedge clk);
      ack = 0;
      checks++;
      if (busy) begin failures++; $display("FAIL not idle after ack"); end
    end
    $display("multi=%0d neg_nsb=%0d cut=%0d overflow=%0d no_fine=%0d empty=%0d",
             n_multi, n_neg, n_cut, n_sat, n_nothr, n_empty);
    checks++;
    if (n_multi == 0 || n_neg == 0 || n_cut == 0 || n_sat == 0 || n_empty == 0) begin
      failures++;
      $display("FAIL a case was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
