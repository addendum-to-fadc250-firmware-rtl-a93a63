// tb_sample_ring: self-checking test of the circular sample buffer.
// Writes a known sample stream (a function of the clock count), then reads
// back through both ports at random distances behind the write pointer and
// compares with the stream value written that many clocks earlier.
module tb_sample_ring;
  import fadc_pkg::*;

  localparam int DEPTH = 256;
  localparam int AW = $clog2(DEPTH);

  logic          clk = 0, rst = 1;
  sample_t       din = '0;
  logic [AW-1:0] wptr, raddr_a = '0, raddr_b = '0;
  sample_t       rdata_a, rdata_b;
  int checks = 0, failures = 0;
  int n = 0;

  sample_ring #(.DEPTH(DEPTH)) dut (.*);

  function automatic sample_t stream(int i);
    return sample_t'((i * 37 + 11) % 4096);
  endfunction

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    // sample i is written at clock i
    for (int i = 0; i < 3000; i++) begin
      din = stream(i);
      @(negedge clk);
      n = i + 1;
      checks++;
      if (wptr !== AW'(n)) begin failures++; $display("FAIL wptr"); end
      if (n > DEPTH) begin
        int da, db;
        da = $urandom_range(1, DEPTH);
        db = $urandom_range(1, DEPTH);
        raddr_a = AW'(n - da);
        raddr_b = AW'(n - db);
        #1;
        checks++;
        if (rdata_a !== stream(n - da) || rdata_b !== stream(n - db)) begin
          failures++;
          $display("FAIL n=%0d da=%0d a=%0d exp=%0d", n, da, rdata_a, stream(n - da));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
