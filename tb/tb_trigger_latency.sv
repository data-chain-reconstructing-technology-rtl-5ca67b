// tb_trigger_latency: self-checking test of the trigger latency buffer.
// For several latencies (including 1 and the maximum) random hit patterns are
// fed in and every output is compared with the input recorded L edges earlier
// (zero before the first samples after reset).
module tb_trigger_latency;
  import mudc_pkg::*;
  localparam int unsigned MAX_LAT = 16;

  logic clk = 0, rst_n = 0;
  logic [$clog2(MAX_LAT+1)-1:0] cfg_latency;
  hits_t hits_in, hits_dly;
  int checks = 0, failures = 0;

  trigger_latency #(.MAX_LAT(MAX_LAT)) dut (.*);

  always #12.5ns clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  hits_t hist [int];
  int    lats [5] = '{1, 2, 5, 15, 16};

  initial begin
    hits_in = '0;
    foreach (lats[n]) begin
      int L;
      L = lats[n];
      rst_n = 0; cfg_latency = L[$clog2(MAX_LAT+1)-1:0];
      hist.delete();
      repeat (2) @(negedge clk);
      rst_n = 1;
      for (int k = 0; k < 200; k++) begin
        hits_in = hits_t'($urandom);
        @(posedge clk); hist[k] = hits_in;
        @(negedge clk);
        begin
          hits_t exp;
          exp = (k - L + 1 >= 0) ? hist[k - L + 1] : '0;
          checks++;
          if (hits_dly !== exp) begin
            failures++;
            if (failures < 10) $display("L=%0d k=%0d got %h exp %h", L, k, hits_dly, exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
