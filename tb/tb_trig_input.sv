// tb_trig_input: self-checking test of the trigger input stage.
// Random samples, masks and thresholds (common and per channel); the expected
// hit bits and amplitudes are computed in the testbench and compared one
// clock later.  Checks that a masked channel gives neither hit nor amplitude
// and that the comparison is against the raw ADC code.
module tb_trig_input;
  import fadc_pkg::*;

  logic              clk = 0, rst = 1;
  sample_t [NCH-1:0] sample = '0;
  logic [NCH-1:0]    trig_mask = '0;
  sample_t           trig_thr = '0;
  logic              trig_indiv = 0;
  sample_t [NCH-1:0] thr_ch = '0;
  logic [NCH-1:0]    hit;
  sample_t [NCH-1:0] trig_amp;
  int checks = 0, failures = 0;
  int masked_seen = 0;

  trig_input dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NCH-1:0]    exp_hit;
    sample_t [NCH-1:0] exp_amp;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      for (int c = 0; c < NCH; c++) begin
        sample[c] = sample_t'($urandom_range(0, 4095));
        thr_ch[c] = sample_t'($urandom_range(0, 4095));
      end
      trig_thr   = sample_t'($urandom_range(0, 4095));
      trig_mask  = NCH'($urandom);
      trig_indiv = 1'($urandom);
      for (int c = 0; c < NCH; c++) begin
        int thr;
        thr = trig_indiv ? int'(thr_ch[c]) : int'(trig_thr);
        exp_hit[c] = !trig_mask[c] && int'(sample[c]) > thr;
        exp_amp[c] = trig_mask[c] ? sample_t'(0) : sample[c];
        if (trig_mask[c] && int'(sample[c]) > thr) masked_seen++;
      end
      @(negedge clk);
      checks++;
      if (hit !== exp_hit || trig_amp !== exp_amp) begin
        failures++;
        $display("FAIL i=%0d hit=%h exp=%h", i, hit, exp_hit);
      end
    end
    checks++;
    if (masked_seen == 0) begin failures++; $display("FAIL mask never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
