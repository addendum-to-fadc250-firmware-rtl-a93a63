// tb_async_ped: self-checking test of the asynchronous pedestal sums.
// For several window lengths it drives random samples on all 16 channels
// (mostly pedestal-like, sometimes above a_max or 0), keeps the whole sample
// history, and on random read requests compares every channel's readout word
// with the sum and quality bit of the last complete window computed in the
// testbench.  All channels must come from the same window.
module tb_async_ped;
  import fadc_pkg::*;

  logic                 clk = 0, rst = 1;
  sample_t [NCH-1:0]    sample = '0;
  logic [3:0]           n_async_ped = 4'd3;
  logic [9:0]           a_max = 10'd300;
  logic                 read_req = 0;
  logic [NCH-1:0][15:0] ped_word;
  logic                 ped_valid;
  int checks = 0, failures = 0, qual_seen = 0;

  async_ped dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sample_t hist [NCH][4096];

  task automatic run(input logic [3:0] code, input int cycles);
    int n;
    n = (code < 3) ? 4 : int'(code) + 1;
    rst = 1; read_req = 0;
    n_async_ped = code;
    a_max = 10'($urandom_range(100, 1023));
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int k = 0; k < cycles; k++) begin
      bit r_pending;
      for (int c = 0; c < NCH; c++) begin
        int u = $urandom_range(0, 99);
        sample_t s;
        if (u < 2)       s = 0;
        else if (u < 5)  s = sample_t'($urandom_range(0, 4095));
        else             s = sample_t'($urandom_range(80, 130));
        sample[c] = s;
        hist[c][k] = s;
      end
      read_req = (k > n) && ($urandom_range(0, 9) == 0);
      r_pending = read_req;
      @(negedge clk);
      if (r_pending) begin
        int w = (k - 1) / n - 1;
        for (int c = 0; c < NCH; c++) begin
          int sum = 0; bit q = 0;
          for (int j = w * n; j < w * n + n; j++) begin
            sum += (hist[c][j] > 1023) ? 1023 : int'(hist[c][j]);
            if (hist[c][j] > sample_t'(a_max) || hist[c][j] == 0) q = 1;
          end
          if (q) qual_seen++;
          checks++;
          if (ped_word[c] !== {q, 1'b0, 14'(sum)} || !ped_valid) begin
            failures++;
            $display("FAIL n=%0d k=%0d ch%0d word=%h exp=%h", n, k, c, ped_word[c], {q, 1'b0, 14'(sum)});
          end
        end
      end
    end
  endtask

  initial begin
    run(4'd3, 500);
    run(4'd15, 800);
    run(4'd7, 500);
    run(4'd1, 300);
    run(4'd10, 500);
    checks++;
    if (qual_seen == 0) begin failures++; $display("FAIL quality bit never set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
