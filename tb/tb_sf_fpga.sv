// tb_sf_fpga: self-checking test of the SRAM FPGA data path.
// Each event puts a hit pattern on the inputs at a known edge, plus two noise
// patterns just before and just after the samples the window must cover, and
// triggers at latency - d (d inside the window). Events are queued, then read
// out: after rd_load the card's own frame (fault flag 0, position, event
// number, the pattern without noise) must come out MSB first from the very
// next cycle, followed by the 32 bits fed into chain_in. Also checked: a read
// of an empty FIFO (no hits, next event number) and the overflow flag.
module tb_sf_fpga;
  import mudc_pkg::*;
  localparam int unsigned MAX_LAT = 16, MAX_WIN = 4, FIFO_DEPTH = 4;
  localparam int L = 6, W = 3;
  localparam logic [FEC_ID_W-1:0] ID = 4'd9;

  logic clk = 0, rst_n = 0;
  logic [$clog2(MAX_LAT+1)-1:0] cfg_latency = L;
  logic [$clog2(MAX_WIN+1)-1:0] cfg_window = W;
  logic [FEC_ID_W-1:0] fec_id = ID;
  hits_t hits;
  logic trigger, rd_load, rd_shift, chain_in, chain_out, overflow;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count;
  int checks = 0, failures = 0;

  sf_fpga #(.MAX_LAT(MAX_LAT), .MAX_WIN(MAX_WIN), .FIFO_DEPTH(FIFO_DEPTH)) dut (.*);

  always #12.5ns clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("mismatch: %s at %0t", what, $time); end
  endtask

  // Drive one event: pattern p at edge t0, trigger at t0 + L - d.
  task automatic run_event(hits_t p, int d);
    localparam int T = W + L + W + 4;
    hits_t hv [T];
    logic  tg [T];
    int t0, tt;
    foreach (hv[i]) begin hv[i] = '0; tg[i] = 0; end
    t0 = W; tt = t0 + L - d;
    hv[tt - L - 1] = hits_t'($urandom) | 16'h0001;  // just before the window
    hv[t0]         = p;
    hv[tt - L + W] = hits_t'($urandom) | 16'h8000;  // just after the window
    tg[tt] = 1;
    for (int i = 0; i < T; i++) begin
      hits = hv[i]; trigger = tg[i];
      @(negedge clk);
    end
    hits = '0; trigger = 0;
  endtask

  task automatic read_event(frame_t exp);
    logic [FRAME_W-1:0] fed;
    fed = FRAME_W'($urandom);
    rd_load = 1;
    @(negedge clk);
    rd_load = 0; rd_shift = 1;
    for (int b = 0; b < 2 * FRAME_W; b++) begin
      logic e;
      chain_in = (b < FRAME_W) ? fed[FRAME_W-1 - b] : 1'b0;
      e = (b < FRAME_W) ? exp[FRAME_W-1 - b] : fed[2*FRAME_W-1 - b];
      checks++;
      if (chain_out !== e) begin
        failures++;
        if (failures < 20) $display("read bit %0d got %b exp %b (frame %h)", b, chain_out, e, exp);
      end
      @(negedge clk);
    end
    rd_shift = 0; chain_in = 0;
  endtask

  hits_t pats [8];

  initial begin
    hits = '0; trigger = 0; rd_load = 0; rd_shift = 0; chain_in = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // empty read before any trigger
    read_event('{hdr: '{fault: 1'b0, fec_id: ID, evt: 0}, hits: '0});
    // three events queued, then read
    for (int e = 0; e < 3; e++) begin
      pats[e] = hits_t'($urandom) | 16'h0100;
      pats[e][0] = 0; pats[e][15] = 0;  // keep noise markers distinguishable
      run_event(pats[e], e % W);
    end
    check("count 3", fifo_count == 3);
    for (int e = 0; e < 3; e++)
      read_event('{hdr: '{fault: 1'b0, fec_id: ID, evt: EVT_W'(e)}, hits: pats[e]});
    check("count 0", fifo_count == 0);
    check("no overflow yet", !overflow);
    // overflow: five events into a four-deep FIFO
    for (int e = 3; e < 8; e++) begin
      pats[e] = hits_t'($urandom) & 16'h7FFE;
      run_event(pats[e], 1);
    end
    check("overflow", overflow);
    check("count full", fifo_count == FIFO_DEPTH);
    for (int e = 3; e < 7; e++)
      read_event('{hdr: '{fault: 1'b0, fec_id: ID, evt: EVT_W'(e)}, hits: pats[e]});
    // empty again: frame carries the number the next event will get (8)
    read_event('{hdr: '{fault: 1'b0, fec_id: ID, evt: 8}, hits: '0});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
