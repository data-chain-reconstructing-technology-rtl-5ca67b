// tb_fault_detect: self-checking test of the fault detection.
// Checks the power-on state, routing of the chain input in both modes, the
// addressed and broadcast BYPASS and RESTORE commands (and that commands for
// another card are ignored), the two-edge reaction to the switch's fault
// output, that the fault stays latched after the fault output is released,
// and that a fault wins over a simultaneous RESTORE.
module tb_fault_detect;
  import mudc_pkg::*;
  localparam logic [FEC_ID_W-1:0] ID = 4'd5;

  logic clk = 0, rst_n = 0;
  logic [FEC_ID_W-1:0] fec_id = ID;
  logic fault_n, cmd_valid, chain_in;
  cmd_t cmd;
  logic sf_chain_in, rc_chain_in, recon_mode, pwr_en, fault_latched;
  int checks = 0, failures = 0;

  fault_detect dut (.*);

  always #12.5ns clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("mismatch: %s at %0t", what, $time); end
  endtask

  task automatic expect_mode(string what, logic rec);
    check({what, " recon"}, recon_mode == rec);
    check({what, " pwr"}, pwr_en == !rec);
    for (int v = 0; v < 2; v++) begin
      chain_in = v[0];
      #1ns;
      check({what, " sf route"}, sf_chain_in == (rec ? 1'b0 : v[0]));
      check({what, " rc route"}, rc_chain_in == (rec ? v[0] : 1'b0));
    end
  endtask

  task automatic send(cmd_op_e op, logic bc, logic [FEC_ID_W-1:0] a);
    cmd = '{op: op, bcast: bc, addr: a}; cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0; cmd = '{op: CMD_NOP, bcast: 0, addr: 0};
  endtask

  initial begin
    fault_n = 1; cmd_valid = 0; chain_in = 0; cmd = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_mode("reset", 0);
    send(CMD_BYPASS, 0, ID + 1);         expect_mode("other card", 0);
    send(CMD_BYPASS, 0, ID);             expect_mode("bypass", 1);
    check("no fault latched", !fault_latched);
    send(CMD_RESTORE, 0, ID);            expect_mode("restore", 0);
    send(CMD_BYPASS, 1, ID + 3);         expect_mode("bcast bypass", 1);
    send(CMD_RESTORE, 1, 0);             expect_mode("bcast restore", 0);
    // fault from the power switch: two synchronizer edges
    fault_n = 0;
    @(negedge clk); expect_mode("fault +1", 0);
    @(negedge clk); expect_mode("fault +2", 0);
    @(negedge clk); expect_mode("fault +3", 1);
    check("latched", fault_latched);
    fault_n = 1;  // the switch releases FAULT once EN is low
    repeat (4) @(negedge clk);
    expect_mode("stays latched", 1);
    send(CMD_RESTORE, 0, ID);            expect_mode("restored", 0);
    check("latch cleared", !fault_latched);
    // fault together with RESTORE: the fault wins
    fault_n = 0;
    @(negedge clk); @(negedge clk);
    send(CMD_RESTORE, 0, ID);
    expect_mode("fault beats restore", 1);
    fault_n = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
