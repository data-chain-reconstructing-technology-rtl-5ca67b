// tb_af_fpga: self-checking test of the anti-fuse FPGA.
// A small model of the SRAM FPGA side (a 32-bit shift register loaded with a
// known frame) is attached. In normal mode the card output must follow that
// register, fed from chain_in. After a BYPASS command, and again after a supply
// fault, the output must carry the reconstructed frame (fault flag, position,
// event number, zero hits) followed by the bits from chain_in, and the power
// enable must be low.
module tb_af_fpga;
  import mudc_pkg::*;
  localparam logic [FEC_ID_W-1:0] ID = 4'd3;

  logic clk = 0, rst_n = 0;
  logic [FEC_ID_W-1:0] fec_id = ID;
  logic fault_n, cmd_valid, rd_load, rd_shift, chain_in, chain_out;
  logic sf_chain_in, sf_chain_out, pwr_en, recon_mode, fault_latched;
  cmd_t cmd;
  int checks = 0, failures = 0, n_reads = 0;

  af_fpga dut (.*);

  // stand-in for the SRAM FPGA's shift register
  logic [FRAME_W-1:0] sf_sr, sf_frame;
  always_ff @(posedge clk)
    if (rd_load) sf_sr <= sf_frame;
    else if (rd_shift) sf_sr <= {sf_sr[FRAME_W-2:0], sf_chain_in};
  assign sf_chain_out = sf_sr[FRAME_W-1];

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

  task automatic read_event(frame_t exp);
    logic [FRAME_W-1:0] fed;
    int bad;
    fed = FRAME_W'($urandom); bad = 0;
    rd_load = 1;
    @(negedge clk);
    rd_load = 0; rd_shift = 1;
    for (int b = 0; b < 2 * FRAME_W; b++) begin
      chain_in = (b < FRAME_W) ? fed[FRAME_W-1 - b] : 1'b0;
      if (chain_out !== ((b < FRAME_W) ? exp[FRAME_W-1 - b] : fed[2*FRAME_W-1 - b])) bad++;
      @(negedge clk);
    end
    rd_shift = 0;
    n_reads++;
    check($sformatf("read %0d (%0d bad bits)", n_reads, bad), bad == 0);
  endtask

  initial begin
    fault_n = 1; cmd_valid = 0; cmd = '0; rd_load = 0; rd_shift = 0; chain_in = 0;
    sf_frame = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("power on", pwr_en && !recon_mode);
    sf_frame = {1'b0, ID, 11'd0, 16'hBEEF};
    read_event(frame_t'(sf_frame));
    // commanded bypass
    cmd = '{op: CMD_BYPASS, bcast: 0, addr: ID}; cmd_valid = 1;
    @(negedge clk); cmd_valid = 0;
    check("bypass cuts power", !pwr_en && recon_mode);
    read_event('{hdr: '{fault: 1'b1, fec_id: ID, evt: 1}, hits: '0});
    cmd = '{op: CMD_RESTORE, bcast: 0, addr: ID}; cmd_valid = 1;
    @(negedge clk); cmd_valid = 0;
    check("restore", pwr_en && !recon_mode);
    sf_frame = {1'b0, ID, 11'd2, 16'h1234};
    read_event(frame_t'(sf_frame));
    // supply fault
    fault_n = 0;
    repeat (3) @(negedge clk);
    fault_n = 1;
    check("fault cuts power", !pwr_en && recon_mode && fault_latched);
    read_event('{hdr: '{fault: 1'b1, fec_id: ID, evt: 3}, hits: '0});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
