// tb_hitbit_scaler: self-checking test of the hit-bit scalers.
// Drives random hit patterns with runs of several clocks, counts rising edges
// per channel in the testbench and compares all 16 scalers, then checks the
// synchronous clear.
module tb_hitbit_scaler;
  import fadc_pkg::*;

  logic                   clk = 0, rst = 1, clear = 0;
  logic [NCH-1:0]         hit = '0;
  logic [NCH-1:0][31:0]   count;
  int checks = 0, failures = 0;
  int unsigned ref_cnt [NCH];
  logic [NCH-1:0] prev = '0;

  hitbit_scaler dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ref_cnt[c]) ref_cnt[c] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 5000; i++) begin
      logic [NCH-1:0] h;
      h = (i % 7 < 3) ? prev : NCH'($urandom);
      for (int c = 0; c < NCH; c++) if (h[c] && !prev[c]) ref_cnt[c]++;
      prev = h;
      hit  = h;
      @(negedge clk);
      if (i % 50 == 49) begin
        for (int c = 0; c < NCH; c++) begin
          checks++;
          if (count[c] !== ref_cnt[c]) begin
            failures++;
            $display("FAIL ch%0d count=%0d exp=%0d", c, count[c], ref_cnt[c]);
          end
        end
      end
    end
    clear = 1; hit = '0; prev = '0;
    @(negedge clk);
    clear = 0;
    checks++;
    if (count !== '0) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
