// tb_data_fifo_bank: self-checking test of the event FIFO.
// Random writes and reads (with phases biased to fill and to drain) are
// compared with a queue reference: head data, count, empty, full, dropped
// writes when full and the sticky overflow flag.
module tb_data_fifo_bank;
  import mudc_pkg::*;
  localparam int unsigned DEPTH = 6;

  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en, empty, full, overflow;
  event_t wr_data, rd_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0, n_full = 0;

  data_fifo_bank #(.DEPTH(DEPTH)) dut (.*);

  always #12.5ns clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  event_t q [$];
  logic   exp_ovf;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("mismatch: %s at %0t", what, $time); end
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_data = '0; exp_ovf = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      int bias;
      bias = (k / 300) % 2;  // 0: fill, 1: drain
      wr_en   = $urandom_range(0, 9) < (bias ? 3 : 7);
      rd_en   = $urandom_range(0, 9) < (bias ? 7 : 3);
      wr_data = event_t'($urandom);
      #1ns;  // outputs before the edge
      check("count", count == q.size());
      check("empty", empty == (q.size() == 0));
      check("full", full == (q.size() == DEPTH));
      if (q.size() > 0) check("head", rd_data == q[0]);
      check("overflow", overflow == exp_ovf);
      if (full) n_full++;
      @(posedge clk);
      begin
        bit do_rd, do_wr;
        do_rd = rd_en && q.size() > 0;
        do_wr = wr_en && q.size() < DEPTH;  // full is judged before the edge
        if (wr_en && !do_wr) exp_ovf = 1;
        if (do_rd) void'(q.pop_front());
        if (do_wr) q.push_back(wr_data);
      end
      @(negedge clk);
    end
    check("reached full", n_full > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
