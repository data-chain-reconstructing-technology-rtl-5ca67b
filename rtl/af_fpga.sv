// af_fpga: the anti-fuse FPGA of a front-end card, which is always powered.
//
// It holds three parts: fault detection, data reconstruction and the output
// multiplexer. In normal operation the serial data from the previous cards
// goes to the SRAM FPGA's shift register and the multiplexer passes that
// register's output to the next card. In reconstruction mode the supply of the
// rest of the card is switched off, the incoming data goes through the
// reconstruction stage and the multiplexer passes its output instead.
//
// Interface: sf_chain_in/sf_chain_out connect to the SRAM FPGA; chain_in and
// chain_out are the cascade cable to the previous and next cards. The
// multiplexer is combinational, so the card adds no delay of its own beyond
// its shift register stage. pwr_en drives the enable of the power switch,
// fault_n comes from its fault output.
//
// The three parts and the data paths follow the original block diagram of the
// anti-fuse FPGA; the signal-level details are this design's own.
module af_fpga
  import mudc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [FEC_ID_W-1:0] fec_id,
  input  logic                fault_n,
  input  logic                cmd_valid,
  input  cmd_t                cmd,
  input  logic                rd_load,
  input  logic                rd_shift,
  input  logic                chain_in,
  output logic                chain_out,
  output logic                sf_chain_in,
  input  logic                sf_chain_out,
  output logic                pwr_en,
  output logic                recon_mode,
  output logic                fault_latched
);

  logic rc_chain_in, rc_chain_out;

  fault_detect u_detect (
    .clk, .rst_n, .fec_id, .fault_n, .cmd_valid, .cmd, .chain_in,
    .sf_chain_in, .rc_chain_in, .recon_mode, .pwr_en, .fault_latched
  );

  data_reconstruction u_recon (
    .clk, .rst_n, .fec_id, .rd_load, .rd_shift,
    .chain_in(rc_chain_in), .chain_out(rc_chain_out)
  );

  // Output multiplexer towards the next card.
  assign chain_out = recon_mode ? rc_chain_out : sf_chain_out;

endmodule
