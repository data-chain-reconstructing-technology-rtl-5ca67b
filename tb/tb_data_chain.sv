// tb_data_chain: end-to-end test of one data chain at its default size
// (16 cards, default depths), playing the part of the readout module.
//
// A reference model keeps, for every card, the events its SRAM FPGA has
// queued (lost when that FPGA loses power) and predicts each frame read from
// serial_out: the last card's first, each as fault flag, position, event
// number and 16 hit bits, with a zero-filled, flagged frame for a card in
// reconstruction mode. The run goes through
//   1. normal operation: events triggered 1 ms apart (1 kHz) and read out;
//   2. cards disconnected by command after their SRAM FPGA lost power;
//   3. a short circuit on a card, which must cut its supply and switch it to
//      reconstruction within 10 ms;
//   4. reconnection of a repaired card, and of a still-shorted card, which
//      must fault again, then of the same card once the short is gone.
// Each mechanism is counted and must occur. The first frame bit must be on
// serial_out in the cycle after rd_load, and a readout takes N_FEC*32 shifts.
module tb_data_chain;
  import mudc_pkg::*;
  localparam int unsigned N_FEC = 16, MAX_LAT = 64, MAX_WIN = 16, FIFO_DEPTH = 16;
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

  data_chain dut (.*);

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
    #200ms;
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
    trigger = 0; cmd_valid = 0; cmd = '0; rd_load = 0; rd_shift = 0;
    load_short = '0; sf_damage = '0;
    foreach (hits[i]) hits[i] = '0;
    foreach (by_cmd[i]) by_cmd[i] = 0;
    foreach (sf_evt[i]) sf_evt[i] = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    check("all powered", &pwr_en && &sf_powered && !(|recon_mode));

    // 1. normal operation
    repeat (3) event_1khz();

    // 2. damaged cards taken out by command (first card and two in the middle)
    foreach (by_cmd[i]) by_cmd[i] = (i == 0 || i == 6 || i == 7);
    sf_damage[0] = 1; sf_damage[6] = 1; sf_damage[7] = 1;
    send(CMD_BYPASS, 0); send(CMD_BYPASS, 6); send(CMD_BYPASS, 7);
    check("bypassed cards unpowered", !pwr_en[0] && !pwr_en[6] && !pwr_en[7]);
    if (!pwr_en[0]) n_power_cut++;
    repeat (2) event_1khz();

    // 3. short circuit on card 11
    load_short[11] = 1; t_short = $realtime;
    wait (recon_mode[11]);
    check("short cut off within 10 ms", ($realtime - t_short) < 10ms);
    @(negedge clk);
    check("shorted card unpowered", !pwr_en[11] && !sf_powered[11] && fault_latched[11]);
    if (!pwr_en[11]) n_power_cut++;
    $display("short circuit on card 11 isolated after %0.3f ms", ($realtime - t_short) / 1ms);
    repeat (2) event_1khz();

    // 4a. repaired card 0 comes back
    sf_damage[0] = 0;
    send(CMD_RESTORE, 0); by_cmd[0] = 0;
    check("card 0 restored", pwr_en[0] && sf_powered[0] && !recon_mode[0]);
    if (!recon_mode[0]) n_restore++;
    repeat (2) event_1khz();

    // 4b. card 11 reconnected while still shorted: must fault again
    send(CMD_RESTORE, 11);
    check("reconnect re-enables the switch", pwr_en[11]);
    t_short = $realtime;
    wait (recon_mode[11]);
    check("second cut off within 10 ms", ($realtime - t_short) < 10ms);
    if (fault_latched[11]) n_refault++;
    @(negedge clk);
    event_1khz();

    // 4c. short removed, card 11 reconnected
    load_short[11] = 0;
    send(CMD_RESTORE, 11);
    check("card 11 back", pwr_en[11] && sf_powered[11] && !recon_mode[11]);
    if (!recon_mode[11]) n_restore++;
    repeat (2) event_1khz();

    check("no FIFO overflow", overflow == '0);
    $display("normal frames %0d, reconstructed by command %0d, by fault %0d, power cuts %0d, restores %0d, re-faults %0d",
             n_normal, n_recon_cmd, n_recon_fault, n_power_cut, n_restore, n_refault);
    check("normal frames seen", n_normal > 0);
    check("command reconstruction seen", n_recon_cmd > 0);
    check("fault reconstruction seen", n_recon_fault > 0);
    check("power cut seen", n_power_cut > 0);
    check("restore seen", n_restore > 0);
    check("re-fault seen", n_refault > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
