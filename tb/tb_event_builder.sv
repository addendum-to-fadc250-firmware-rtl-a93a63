// tb_event_builder: self-checking test of the event builder.
// Several runs with different formats (mode 9 / mode 10, event headers
// always or only at block start, plain or extended event header, block
// levels including 256, odd and even window lengths).  For each event it draws random
// channel results and raw windows, builds the expected word list here with
// its own bit packing, and compares it word by word with the output stream,
// which is read under random back-pressure.  Counts how often headers were
// suppressed, blocks closed and raw windows were written.
module tb_event_builder;
  import fadc_pkg::*;

  logic                   clk = 0, rst = 1, start = 0, dout_ready = 0;
  fadc_cfg_t              cfg = '0;
  logic [11:0]            evnum = '0;
  logic [9:0]             ttime = '0;
  chan_result_t [NCH-1:0] res = '0;
  logic [9:0]             raw_idx;
  sample_t [NCH-1:0]      raw_sample;
  logic [31:0]            dout;
  logic                   dout_valid, busy, done;
  int checks = 0, failures = 0;
  int n_suppressed = 0, n_trailers = 0, n_raw = 0, n_ext = 0;

  sample_t rawmem [NCH][WIN_MAX];
  for (genvar c = 0; c < NCH; c++) begin : g_raw
    assign raw_sample[c] = rawmem[c][raw_idx[8:0]];
  end

  event_builder dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] expq [$];

  task automatic one_run(input bit mode10, input bit supp, input bit ext,
                         input int bl, input int ptw, input int nev);
    int blocknum = 1, j = 0, words = 0;
    rst = 1;
    cfg = '0;
    cfg.mode10 = mode10; cfg.hdr_suppress = supp; cfg.hdr_ext = ext;
    cfg.hdr_ext_bit = 1'b1; cfg.hdr_dtype = 4'd9;
    cfg.slot = 5'($urandom_range(3, 20));
    cfg.block_level = 8'(bl);
    cfg.ptw = 10'(ptw);
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int e = 0; e < nev; e++) begin
      expq.delete();
      evnum = 12'($urandom);
      ttime = 10'($urandom);
      for (int c = 0; c < NCH; c++) begin
        res[c] = chan_result_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
        res[c].npulse = ($urandom_range(0, 2) == 0) ? 2'd0 : 2'($urandom_range(1, 3));
        for (int i = 0; i < ptw; i++) rawmem[c][i] = sample_t'($urandom);
      end
      if (j == 0) begin
        expq.push_back({1'b1, 4'd0, cfg.slot, 4'd0, 10'(blocknum), 8'(bl)});
        words = 1;
      end
      if (!supp || j == 0) begin
        if (ext) expq.push_back({1'b1, 4'd2, 1'b1, 4'd9, ttime, evnum});
        else     expq.push_back({1'b1, 4'd2, cfg.slot, ttime, evnum});
        words++;
        if (ext) n_ext++;
      end else n_suppressed++;
      for (int c = 0; c < NCH; c++) begin
        if (mode10) begin
          expq.push_back({1'b1, 4'd4, 4'(c), 13'd0, 10'(ptw)});
          words++;
          for (int i = 0; i < ptw; i += 2) begin
            bit v = (i + 1 < ptw);
            expq.push_back({4'd0, rawmem[c][i], 2'd0, !v, 1'b0, v ? rawmem[c][i + 1] : 12'd0});
            words++;
          end
          n_raw++;
        end
        if (res[c].npulse != 0) begin
          expq.push_back({1'b1, 4'd9, 8'(j + 1), 4'(c), res[c].pq, res[c].ped});
          words++;
          for (int k = 0; k < int'(res[c].npulse); k++) begin
            pulse_t p = res[c].p[k];
            expq.push_back({2'b01, p.integral, p.iq, p.tot});
            expq.push_back({2'b00, p.coarse, p.fine, p.peak, p.tq});
            words += 2;
          end
        end
      end
      if (j == bl - 1) begin
        expq.push_back({1'b1, 4'd1, cfg.slot, 22'(words + 1)});
        n_trailers++;
        blocknum++;
        j = 0;
      end else j++;
      // run the event
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done) begin
        dout_ready = ($urandom_range(0, 3) != 0);
        #1;
        if (dout_valid && dout_ready) begin
          checks++;
          if (expq.size() == 0) begin
            failures++; $display("FAIL extra word %h", dout);
          end else begin
            logic [31:0] w = expq.pop_front();
            if (dout !== w) begin
              failures++;
              $display("FAIL event %0d word %h expected %h", e, dout, w);
            end
          end
        end
        @(negedge clk);
      end
      dout_ready = 0;
      @(negedge clk);
      checks++;
      if (expq.size() != 0) begin failures++; $display("FAIL %0d words missing", expq.size()); end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    one_run(0, 0, 0, 3, 10, 7);
    one_run(0, 1, 0, 4, 10, 9);
    one_run(1, 1, 0, 2, 7, 5);
    one_run(1, 0, 1, 3, 12, 4);
    one_run(0, 1, 1, 1, 4, 3);
    one_run(0, 1, 0, 256, 8, 258);   // block of 256 events, relative number wraps
    $display("suppressed=%0d trailers=%0d raw=%0d ext=%0d", n_suppressed, n_trailers, n_raw, n_ext);
    checks++;
    if (n_suppressed == 0 || n_trailers == 0 || n_raw == 0 || n_ext == 0) begin
      failures++; $display("FAIL a format was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
