// fadc_ref_pkg: reference model used by the end-to-end testbench.
//
// ref_window() computes, from the samples of one readout window and the
// configuration, what a channel must report: pedestal sum and quality, then
// up to NP pulses with integral, time over threshold, peak, coarse and fine
// time and quality bits.  It is written as plain loops over the window,
// independently of the clock-by-clock walk of the hardware.  The pack_*
// functions give the 32-bit words of the output stream bit by bit.
package fadc_ref_pkg;
  import fadc_pkg::*;

  typedef sample_t window_t [WIN_MAX];

  function automatic chan_result_t ref_window(input window_t win, input fadc_cfg_t c);
    chan_result_t r;
    int last, plen, np, nthr, pos, psum;
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
      if (!found) break;
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
    return r;
  endfunction

  function automatic logic [31:0] pack_block_header(int slot, int blk, int bl);
    logic [31:0] w = '0;
    w[31] = 1'b1; w[30:27] = 4'd0; w[26:22] = 5'(slot); w[17:8] = 10'(blk); w[7:0] = 8'(bl);
    return w;
  endfunction

  function automatic logic [31:0] pack_block_trailer(int slot, int nwords);
    logic [31:0] w = '0;
    w[31] = 1'b1; w[30:27] = 4'd1; w[26:22] = 5'(slot); w[21:0] = 22'(nwords);
    return w;
  endfunction

  function automatic logic [31:0] pack_event_header(int slot, int ttime, int evnum);
    logic [31:0] w = '0;
    w[31] = 1'b1; w[30:27] = 4'd2; w[26:22] = 5'(slot); w[21:12] = 10'(ttime); w[11:0] = 12'(evnum);
    return w;
  endfunction

  function automatic logic [31:0] pack_hit_header(int rel_ev, int ch, bit pq, int ped);
    logic [31:0] w = '0;
    w[31] = 1'b1; w[30:27] = 4'd9; w[26:19] = 8'(rel_ev); w[18:15] = 4'(ch);
    w[14] = pq; w[13:0] = 14'(ped);
    return w;
  endfunction

  function automatic logic [31:0] pack_integral(pulse_t p);
    logic [31:0] w = '0;
    w[30] = 1'b1; w[29:12] = p.integral; w[11:9] = p.iq; w[8:0] = p.tot;
    return w;
  endfunction

  function automatic logic [31:0] pack_time(pulse_t p);
    logic [31:0] w = '0;
    w[29:21] = p.coarse; w[20:15] = p.fine; w[14:3] = p.peak; w[2:0] = p.tq;
    return w;
  endfunction

  function automatic logic [31:0] pack_raw_header(int ch, int ptw);
    logic [31:0] w = '0;
    w[31] = 1'b1; w[30:27] = 4'd4; w[26:23] = 4'(ch); w[11:0] = 12'(ptw);
    return w;
  endfunction

  function automatic logic [31:0] pack_raw_data(sample_t a, sample_t b, bit bvalid);
    logic [31:0] w = '0;
    w[27:16] = a;
    w[13] = !bvalid;
    if (bvalid) w[11:0] = b;
    return w;
  endfunction

endpackage
