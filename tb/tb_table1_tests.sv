// tb_table1_tests: the laboratory test programme on a four-card chain.
//
// A chain of four cards (first card, card 2, card 3, last card) is run, as
// the readout module would, with 1 kHz triggers and one readout per event.
// First in normal mode, then in the four abnormal conditions: the SRAM FPGA
// supply of the marked cards is cut and those cards are disconnected by
// command, before the next condition every card is reconnected.
//      condition  first  card 2  card 3  last
//      1          dead   ok      ok      ok
//      2          dead   dead    dead    ok
//      3          ok     dead    ok      dead
//      4          ok     dead    dead    dead
// In every readout the healthy cards' frames must arrive complete and
// correct, the dead cards' frames must hold only zero hits with the fault
// flag, and the readout length must stay N_FEC*32 bits. Finally a short
// circuit is put on card 2 and must be isolated within 10 ms.
module tb_table1_tests;
  import mudc_pkg::*;
  localparam int unsigned N_FEC = 4, MAX_LAT = 64, MAX_WIN = 16, FIFO_DEPTH = 16;
  localparam int L = 40, W = 4;

  logic clk = 0, rst_n = 0;
  logic [$clog2(MAX_LAT+1)-1:0] cfg_latency = L;
  logic [$clog2(MAX_WIN+1)-1:0] cfg_window = W;
  hits_t hits [N_FEC];
  logic trigger, cmd_valid, rd_load, rd_shift, serial_out;
  cmd_t cmd;
  logic [N_FEC-1:0] load_short, sf_damage, recon_mode, pwr_en, fault_latched, sf_powered, overflow;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count [N_FEC];
  logic [N_FEC-1:0] fault_n, sf_pwr_good, vout_ok;
  int checks = 0, failures = 0;

  data_chain #(.N_FEC(N_FEC)) dut (.*);

  // each card's power switch; sf_damage cuts a card's SRAM FPGA supply
  // without over-current, as a broken card would
  for (genvar i = 0; i < N_FEC; i++) begin : g_pwr
    tps2552_model u_pwr (.vin_ok(1'b1), .en(pwr_en[i]), .load_short(load_short[i]),
                         .vout_ok(vout_ok[i]), .fault_n(fault_n[i]));
  end
  assign sf_pwr_good = vout_ok & ~sf_damage;
  assign sf_powered  = sf_pwr_good;

  always #12.5ns clk = ~clk;  // 40 MHz

  initial begin
    #400ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("mismatch: %s at %0t", what, $time); end
  endtask

  // ---------------- reference model ----------------
  event_t q [N_FEC][$];
  int     sf_evt [N_FEC];
  int     rd_cnt = 0;
  int     n_normal = 0, n_recon_cmd = 0, n_recon_fault = 0, n_power_cut = 0,
          n_restore = 0, n_refault = 0, n_bad_frames = 0;
  logic   by_cmd [N_FEC];

  // an unpowered SRAM FPGA forgets its events and restarts its numbering
  always @(negedge clk)
    for (int i = 0; i < N_FEC; i++)
      if (!sf_powered[i]) begin q[i].delete(); sf_evt[i] = 0; end

  task automatic fire_event();
    hits_t p [N_FEC];
    foreach (p[i]) p[i] = hits_t'($urandom);
    foreach (hits[i]) hits[i] = p[i];
    @(negedge clk);
    foreach (hits[i]) hits[i] = '0;
    repeat (L - 1) @(negedge clk);
    trigger = 1;
    @(negedge clk);
    trigger = 0;
    repeat (W + 2) @(negedge clk);
    for (int i = 0; i < N_FEC; i++)
      if (sf_powered[i]) begin
        q[i].push_back('{evt: EVT_W'(sf_evt[i]), hits: p[i]});
        sf_evt[i]++;
      end
  endtask

  task automatic readout();
    logic [N_FEC*FRAME_W-1:0] got;
    int shifts;
    rd_load = 1;
    @(negedge clk);
    rd_load = 0; rd_shift = 1; shifts = 0;
    for (int b = N_FEC * FRAME_W - 1; b >= 0; b--) begin
      got[b] = serial_out;
      @(negedge clk);
      shifts++;
    end
    rd_shift = 0;
    check("readout length", shifts == N_FEC * FRAME_W);
    for (int i = N_FEC - 1; i >= 0; i--) begin
      frame_t f, e;
      f = got[i*FRAME_W +: FRAME_W];
      if (recon_mode[i]) begin
        e = '{hdr: '{fault: 1'b1, fec_id: FEC_ID_W'(i), evt: EVT_W'(rd_cnt)}, hits: '0};
        if (by_cmd[i]) n_recon_cmd++; else n_recon_fault++;
      end else if (q[i].size() > 0) begin
        event_t ev;
        ev = q[i].pop_front();
        e = '{hdr: '{fault: 1'b0, fec_id: FEC_ID_W'(i), evt: ev.evt}, hits: ev.hits};
        n_normal++;
      end else begin
        e = '{hdr: '{fault: 1'b0, fec_id: FEC_ID_W'(i), evt: EVT_W'(sf_evt[i])}, hits: '0};
        n_normal++;
      end
      checks++;
      if (f !== e) begin
        failures++; n_bad_frames++;
        if (failures < 30) $display("readout %0d card %0d: got %h exp %h", rd_cnt, i, f, e);
      end
    end
    rd_cnt++;
  endtask

  task automatic send(cmd_op_e op, int a);
    cmd = '{op: op, bcast: 1'b0, addr: FEC_ID_W'(a)}; cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0;
    @(negedge clk);
  endtask

  // one event at 1 kHz: trigger, read, idle to the end of the millisecond
  task automatic event_1khz();
    realtime t0;
    t0 = $realtime;
    fire_event();
    readout();
    while ($realtime - t0 < 1ms) @(negedge clk);
  endtask

  initial begin
    realtime t_short;
    logic [N_FEC-1:0] cond [4];
    cond[0] = 4'b0001; cond[1] = 4'b0111; cond[2] = 4'b1010; cond[3] = 4'b1110;
    trigger = 0; cmd_valid = 0; cmd = '0; rd_load = 0; rd_shift = 0;
    load_short = '0; sf_damage = '0;
    foreach (hits[i]) hits[i] = '0;
    foreach (by_cmd[i]) by_cmd[i] = 0;
    foreach (sf_evt[i]) sf_evt[i] = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // normal work mode
    repeat (20) event_1khz();
    check("normal mode without errors", n_bad_frames == 0);

    // abnormal work mode: Table I conditions
    for (int c = 0; c < 4; c++) begin
      int bad0;
      bad0 = n_bad_frames;
      sf_damage = cond[c];
      for (int i = 0; i < N_FEC; i++)
        if (cond[c][i]) begin by_cmd[i] = 1; send(CMD_BYPASS, i); end
      check($sformatf("condition %0d: dead cards unpowered", c + 1), (pwr_en & cond[c]) == '0);
      repeat (5) event_1khz();
      check($sformatf("condition %0d: all frames as expected", c + 1), n_bad_frames == bad0);
      sf_damage = '0;
      for (int i = 0; i < N_FEC; i++)
        if (cond[c][i]) begin send(CMD_RESTORE, i); by_cmd[i] = 0; n_restore++; end
      check($sformatf("condition %0d: cards reconnected", c + 1), pwr_en == '1 && recon_mode == '0);
      repeat (2) event_1khz();
    end

    // short circuit test
    load_short[1] = 1; t_short = $realtime;
    wait (recon_mode[1]);
    check("short isolated within 10 ms", ($realtime - t_short) < 10ms);
    if (!pwr_en[1]) n_power_cut++;
    @(negedge clk);
    repeat (3) event_1khz();

    $display("normal frames %0d, reconstructed by command %0d, by fault %0d, power cuts %0d, restores %0d",
             n_normal, n_recon_cmd, n_recon_fault, n_power_cut, n_restore);
    check("normal frames seen", n_normal > 0);
    check("command reconstruction seen", n_recon_cmd > 0);
    check("fault reconstruction seen", n_recon_fault > 0);
    check("power cut seen", n_power_cut > 0);
    check("restore seen", n_restore > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
