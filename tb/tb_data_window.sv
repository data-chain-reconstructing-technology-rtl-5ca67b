// tb_data_window: self-checking test of the event window.
// Random sparse hits and random triggers are applied for several window
// lengths. A reference built from the recorded input history predicts, for
// each accepted trigger at edge t, an event at edge t+W-1 holding the OR of the
// samples at edges t..t+W-1 and the next event number; triggers inside an
// open window must be ignored. Event timing, pattern and number are checked.
module tb_data_window;
  import mudc_pkg::*;
  localparam int unsigned MAX_WIN = 8;

  logic clk = 0, rst_n = 0;
  logic [$clog2(MAX_WIN+1)-1:0] cfg_window;
  logic trigger, busy, ev_valid;
  hits_t hits_dly;
  event_t ev;
  logic [EVT_W-1:0] evt_next;
  int checks = 0, failures = 0, n_events = 0;

  data_window #(.MAX_WIN(MAX_WIN)) dut (.*);

  always #12.5ns clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  hits_t hist [int];
  int    wins [4] = '{1, 2, 5, 8};

  initial begin
    trigger = 0; hits_dly = '0;
    foreach (wins[n]) begin
      int W, last_acc, evn;
      int exp_edge [$];
      W = wins[n]; last_acc = -1000; evn = 0;
      rst_n = 0; cfg_window = W[$clog2(MAX_WIN+1)-1:0];
      hist.delete();
      repeat (2) @(negedge clk);
      rst_n = 1;
      for (int k = 0; k < 600; k++) begin
        hits_dly = ($urandom_range(0, 3) == 0) ? hits_t'(1 << $urandom_range(0, 15)) : '0;
        trigger  = ($urandom_range(0, 5) == 0) && (k < 580);
        @(posedge clk);
        hist[k] = hits_dly;
        if (trigger && k >= last_acc + W) begin
          last_acc = k;
          exp_edge.push_back(k + W - 1);
        end
        @(negedge clk);
        if (exp_edge.size() > 0 && exp_edge[0] == k) begin
          hits_t acc;
          acc = '0;
          for (int j = k - W + 1; j <= k; j++) acc |= hist[j];
          void'(exp_edge.pop_front());
          checks++;
          if (!ev_valid || ev.hits !== acc || ev.evt !== EVT_W'(evn)) begin
            failures++;
            $display("W=%0d k=%0d valid=%0b hits %h exp %h evt %0d exp %0d", W, k, ev_valid, ev.hits, acc, ev.evt, evn);
          end
          evn++; n_events++;
        end else begin
          checks++;
          if (ev_valid) begin failures++; $display("W=%0d k=%0d unexpected event", W, k); end
        end
      end
    end
    trigger = 0;
    checks++;
    if (n_events < 50) begin failures++; $display("too few events %0d", n_events); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
