// tb_ped_sum: self-checking test of the pedestal accumulator.
// Feeds windows of random 12-bit samples of random length 4..16, sums the
// 10-bit-clipped values in the testbench and compares sum and quality bit
// (set for a sample above a_max or equal to 0) one clock after the window.
module tb_ped_sum;
  import fadc_pkg::*;

  logic        clk = 0, rst = 1, en = 0, first = 0;
  sample_t     sample = '0;
  logic [9:0]  a_max = '0;
  logic [13:0] sum;
  logic        qual;
  int checks = 0, failures = 0;

  ped_sum dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_window(input int n, input int mode);
    int exp_sum = 0;
    bit exp_q = 0;
    a_max = 10'($urandom_range(0, 1023));
    for (int i = 0; i < n; i++) begin
      sample_t s;
      case (mode)
        0: s = sample_t'($urandom_range(1, 4095));
        1: s = sample_t'($urandom_range(1, int'(a_max) > 0 ? int'(a_max) : 1));
        default: s = (i == n / 2) ? sample_t'(0) : sample_t'($urandom_range(1, 200));
      endcase
      if (mode == 1 && s > sample_t'(a_max)) s = sample_t'(a_max);
      if (mode == 1 && s == 0) s = 1;
      exp_sum += (s > 1023) ? 1023 : int'(s);
      if (s > sample_t'(a_max) || s == 0) exp_q = 1;
      @(negedge clk);
      en = 1; first = (i == 0); sample = s;
    end
    @(negedge clk);
    en = 0;
    checks++;
    if (sum !== 14'(exp_sum) || qual !== exp_q) begin
      failures++;
      $display("FAIL n=%0d mode=%0d sum=%0d exp=%0d q=%0b exp=%0b", n, mode, sum, exp_sum, qual, exp_q);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int w = 0; w < 300; w++) run_window($urandom_range(4, 16), w % 3);
    // all 16 samples at full scale: largest sum
    a_max = 10'd1023;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); en = 1; first = (i == 0); sample = 12'd1023;
    end
    @(negedge clk); en = 0;
    checks++;
    if (sum !== 14'd16368 || qual !== 1'b0) begin failures++; $display("FAIL full scale %0d", sum); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
