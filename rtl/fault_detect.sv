// fault_detect: decides whether a card's own data or regenerated data goes on.
//
// Two things put a card into reconstruction mode: the fault signal of the
// current-limiting power switch (a short circuit on the card's supply), and a
// BYPASS command from the readout module addressed to the card (used when the
// card is known to be broken). In reconstruction mode the block keeps the
// supply switch disabled, so everything on the card except the anti-fuse FPGA
// stays unpowered, and routes the serial data from the previous cards to the
// data reconstruction stage instead of to the SRAM FPGA. A RESTORE command
// clears both causes and re-enables the supply; if the short is still there
// the switch reports it again and the card drops back into reconstruction.
//
// Interface: fault_n is the switch's active-low fault output, asynchronous,
// taken through a two-flop synchronizer; its fault is latched. cmd is sampled
// when cmd_valid is high. recon_mode and pwr_en come straight from flip-flops
// and change two
// edges after fault_n falls, one edge after a command. The chain routing
// follows recon_mode at once, so a mode change during a readout spoils that
// event's frames for this card and the cards before it.
//
// The original design gives the function (commanded switch to reconstruction, power
// cut on a fault); the command set, the latch and the synchronizer are this
// design's choices. Assertions check that only defined commands arrive and
// that a synchronized fault always leaves the card disconnected.
module fault_detect
  import mudc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [FEC_ID_W-1:0] fec_id,
  input  logic                fault_n,      // from the power switch, active low
  input  logic                cmd_valid,
  input  cmd_t                cmd,
  input  logic                chain_in,     // serial data from the previous cards
  output logic                sf_chain_in,  // to the SRAM FPGA shift register
  output logic                rc_chain_in,  // to the data reconstruction stage
  output logic                recon_mode,
  output logic                pwr_en,       // enable of the power switch
  output logic                fault_latched // a supply fault has been seen
);

  logic [1:0] fault_sync;  // [1] is the synchronized, inverted fault
  logic       forced;
  logic       for_me;

  always_comb begin
    for_me = cmd_valid && (cmd.bcast || cmd.addr == fec_id);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fault_sync    <= '0;
      fault_latched <= 1'b0;
      forced        <= 1'b0;
    end else begin
      fault_sync <= {fault_sync[0], ~fault_n};
      if (for_me && cmd.op == CMD_BYPASS)  forced <= 1'b1;
      if (for_me && cmd.op == CMD_RESTORE) begin
        forced        <= 1'b0;
        fault_latched <= 1'b0;
      end
      if (fault_sync[1]) fault_latched <= 1'b1;  // a fault wins over RESTORE
    end
  end

  always_comb begin
    recon_mode  = fault_latched || forced;
    pwr_en      = !recon_mode;
    sf_chain_in = recon_mode ? 1'b0 : chain_in;
    rc_chain_in = recon_mode ? chain_in : 1'b0;
  end

  // Command rule: only the defined operations are sent.
  a_cmd_op_defined: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid |-> cmd.op inside {CMD_NOP, CMD_BYPASS, CMD_RESTORE})
    else $error("undefined command operation %0d", cmd.op);
  // A synchronized supply fault always leaves the card disconnected.
  a_fault_disconnects: assert property (@(posedge clk) disable iff (!rst_n)
    fault_sync[1] |=> (recon_mode && !pwr_en))
    else $error("supply fault did not disconnect the card");

endmodule
