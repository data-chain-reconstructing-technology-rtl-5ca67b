// fec: one front-end card of a muon-chamber data chain.
//
// The card digitizes 16 RPC strips (the discriminators and the threshold DAC
// are analog and sit outside this module: hits are their digital outputs). Its
// SRAM FPGA buffers triggered events and shifts them into the serial chain;
// its anti-fuse FPGA routes the chain and, when the card fails, replaces the
// card's data with zero-filled frames carrying a fault flag. A
// current-limiting power switch supplies the SRAM FPGA, DAC and comparators
// and reports a short circuit to the anti-fuse FPGA, which then keeps that
// supply off. The anti-fuse FPGA is powered separately and never switched.
// The switch is an analog part outside this module: pwr_en drives its enable
// pin and fault_n is its open-drain fault output.
//
// Interface: clk, trigger, commands, configuration and the readout controls
// rd_load/rd_shift are common to the whole chain; chain_in comes from the
// previous card, chain_out goes to the next one. sf_pwr_good tells whether the
// switched rail, and so the SRAM FPGA, is powered. While it is low the SRAM
// FPGA is held in reset (it restarts empty) and its serial output is taken as
// a constant 1, as a floating line with a pull-up would read.
//
// The partition into SRAM FPGA, anti-fuse FPGA and power switch follows the
// original design; the power-good input and the unpowered-output value are this
// design's choices.
module fec
  import mudc_pkg::*;
#(
  parameter int unsigned MAX_LAT    = 64,
  parameter int unsigned MAX_WIN    = 16,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [FEC_ID_W-1:0]             fec_id,
  input  logic [$clog2(MAX_LAT+1)-1:0]    cfg_latency,
  input  logic [$clog2(MAX_WIN+1)-1:0]    cfg_window,
  input  hits_t                           hits,
  input  logic                            trigger,
  input  logic                            cmd_valid,
  input  cmd_t                            cmd,
  input  logic                            rd_load,
  input  logic                            rd_shift,
  input  logic                            chain_in,
  output logic                            chain_out,
  input  logic                            fault_n,      // power switch FAULT
  input  logic                            sf_pwr_good,  // switched rail is up
  output logic                            pwr_en,       // power switch EN
  output logic                            recon_mode,
  output logic                            fault_latched,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count,
  output logic                            overflow
);

  logic sf_rst_n;
  logic sf_chain_in, sf_chain_out, sf_out_seen;

  assign sf_rst_n    = rst_n && sf_pwr_good;
  assign sf_out_seen = sf_pwr_good ? sf_chain_out : 1'b1;

  sf_fpga #(.MAX_LAT(MAX_LAT), .MAX_WIN(MAX_WIN), .FIFO_DEPTH(FIFO_DEPTH)) u_sf (
    .clk, .rst_n(sf_rst_n), .cfg_latency, .cfg_window, .fec_id, .hits, .trigger,
    .rd_load, .rd_shift, .chain_in(sf_chain_in), .chain_out(sf_chain_out),
    .fifo_count, .overflow
  );

  af_fpga u_af (
    .clk, .rst_n, .fec_id, .fault_n, .cmd_valid, .cmd, .rd_load, .rd_shift,
    .chain_in, .chain_out, .sf_chain_in, .sf_chain_out(sf_out_seen),
    .pwr_en, .recon_mode, .fault_latched
  );

endmodule
