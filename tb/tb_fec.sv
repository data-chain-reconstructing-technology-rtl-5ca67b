// tb_fec: one front-end card between a pattern source and a bit collector.
// Checks a normal event (own frame, then the bits from the previous card),
// a short circuit (supply cut, fault latched, reconstructed frame with the
// previous card's bits still passed on), reconnection after the short is gone
// (the SRAM FPGA restarts empty: a frame with no hits and event number 0),
// and a disconnect by command of a card whose SRAM FPGA has lost power.
module tb_fec;
  import mudc_pkg::*;
  localparam int unsigned MAX_LAT = 16, MAX_WIN = 4, FIFO_DEPTH = 4;
  localparam int L = 5, W = 2;
  localparam logic [FEC_ID_W-1:0] ID = 4'd7;

  logic clk = 0, rst_n = 0;
  logic [FEC_ID_W-1:0] fec_id = ID;
  logic [$clog2(MAX_LAT+1)-1:0] cfg_latency = L;
  logic [$clog2(MAX_WIN+1)-1:0] cfg_window = W;
  hits_t hits;
  logic trigger, cmd_valid, rd_load, rd_shift, chain_in, chain_out;
  cmd_t cmd;
  logic load_short, sf_damage, recon_mode, pwr_en, fault_latched, sf_powered, overflow;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count;
  logic fault_n, sf_pwr_good, vout_ok;
  int checks = 0, failures = 0, rd_cnt = 0;

  fec #(.MAX_LAT(MAX_LAT), .MAX_WIN(MAX_WIN), .FIFO_DEPTH(FIFO_DEPTH)) dut (.*);

  tps2552_model u_pwr (.vin_ok(1'b1), .en(pwr_en), .load_short, .vout_ok, .fault_n);
  assign sf_pwr_good = vout_ok && !sf_damage;
  assign sf_powered  = sf_pwr_good;

  always #12.5ns clk = ~clk;

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("mismatch: %s at %0t", what, $time); end
  endtask

  task automatic fire(hits_t p);
    hits = p; @(negedge clk); hits = '0;
    repeat (L - 1) @(negedge clk);
    trigger = 1; @(negedge clk); trigger = 0;
    repeat (W + 2) @(negedge clk);
  endtask

  task automatic read_event(frame_t exp, string what);
    logic [FRAME_W-1:0] fed;
    int bad;
    fed = FRAME_W'($urandom); bad = 0;
    rd_load = 1; @(negedge clk);
    rd_load = 0; rd_shift = 1;
    for (int b = 0; b < 2 * FRAME_W; b++) begin
      chain_in = (b < FRAME_W) ? fed[FRAME_W-1 - b] : 1'b0;
      if (chain_out !== ((b < FRAME_W) ? exp[FRAME_W-1 - b] : fed[2*FRAME_W-1 - b])) bad++;
      @(negedge clk);
    end
    rd_shift = 0; rd_cnt++;
    check($sformatf("%s (%0d bad bits)", what, bad), bad == 0);
  endtask

  initial begin
    hits = '0; trigger = 0; cmd_valid = 0; cmd = '0; rd_load = 0; rd_shift = 0;
    chain_in = 0; load_short = 0; sf_damage = 0;
    repeat (3) @(negedge clk);
    rst_n = 1; @(negedge clk);
    fire(16'hA5C3);
    read_event('{hdr: '{fault: 1'b0, fec_id: ID, evt: 0}, hits: 16'hA5C3}, "normal");
    load_short = 1;
    wait (recon_mode); @(negedge clk);
    check("short: supply cut", !pwr_en && !sf_powered && fault_latched);
    fire(16'hFFFF);
    read_event('{hdr: '{fault: 1'b1, fec_id: ID, evt: EVT_W'(rd_cnt)}, hits: '0}, "reconstructed after short");
    load_short = 0;
    cmd = '{op: CMD_RESTORE, bcast: 1'b0, addr: ID}; cmd_valid = 1; @(negedge clk); cmd_valid = 0;
    @(negedge clk);
    check("restored", pwr_en && sf_powered && !recon_mode);
    read_event('{hdr: '{fault: 1'b0, fec_id: ID, evt: 0}, hits: '0}, "restarted SRAM FPGA");
    fire(16'h0F0F);
    read_event('{hdr: '{fault: 1'b0, fec_id: ID, evt: 0}, hits: 16'h0F0F}, "normal again");
    sf_damage = 1;
    cmd = '{op: CMD_BYPASS, bcast: 1'b0, addr: ID}; cmd_valid = 1; @(negedge clk); cmd_valid = 0;
    check("bypass", !pwr_en && recon_mode && !fault_latched);
    read_event('{hdr: '{fault: 1'b1, fec_id: ID, evt: EVT_W'(rd_cnt)}, hits: '0}, "reconstructed by command");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
