// data_chain: one daisy-chained readout chain of the muon identification system.
//
// N_FEC front-end cards are linked by cascade cables: each card's serial output
// feeds the next card's serial input, and the last card drives the cable to
// the readout module, which also broadcasts clock, trigger, commands,
// configuration and readout controls to every card. A readout call (one
// rd_load pulse followed by N_FEC*32 rd_shift cycles) moves one event of every
// card to serial_out, the last card's frame first and card 0's last. A failed
// card is taken out of the chain by its own anti-fuse FPGA, which keeps the
// chain running and fills that card's frame with zeros and a fault flag.
//
// Interface: card i gets position i (card 0 is the first card, farthest from
// the readout; card N_FEC-1 is the last). serial_out is valid from the edge
// after rd_load and moves one bit per rd_shift cycle, MSB of each frame first.
// Per-card status outputs show the mode of each card. Each card's
// current-limited power switch is an analog part outside this module: pwr_en
// drives its enable, fault_n is its fault output and sf_pwr_good says whether
// the rail it switches (SRAM FPGA, threshold DAC, comparators) is up.
//
// The chain of 16 cards and the single serial output follow the original design; the
// readout control signals are this design's choice. An assertion checks that
// rd_load and rd_shift are never high together.
module data_chain
  import mudc_pkg::*;
#(
  parameter int unsigned N_FEC      = 16,
  parameter int unsigned MAX_LAT    = 64,
  parameter int unsigned MAX_WIN    = 16,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [$clog2(MAX_LAT+1)-1:0]    cfg_latency,
  input  logic [$clog2(MAX_WIN+1)-1:0]    cfg_window,
  input  hits_t                           hits          [N_FEC],
  input  logic                            trigger,
  input  logic                            cmd_valid,
  input  cmd_t                            cmd,
  input  logic                            rd_load,
  input  logic                            rd_shift,
  output logic                            serial_out,
  input  logic [N_FEC-1:0]                fault_n,
  input  logic [N_FEC-1:0]                sf_pwr_good,
  output logic [N_FEC-1:0]                pwr_en,
  output logic [N_FEC-1:0]                recon_mode,
  output logic [N_FEC-1:0]                fault_latched,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count    [N_FEC],
  output logic [N_FEC-1:0]                overflow
);

  logic [N_FEC:0] link;  // link[i] feeds card i, link[i+1] is its output

  assign link[0]    = 1'b0;
  assign serial_out = link[N_FEC];

  for (genvar i = 0; i < N_FEC; i++) begin : g_fec
    fec #(.MAX_LAT(MAX_LAT), .MAX_WIN(MAX_WIN), .FIFO_DEPTH(FIFO_DEPTH)) u_fec (
      .clk, .rst_n, .fec_id(FEC_ID_W'(i)), .cfg_latency, .cfg_window,
      .hits(hits[i]), .trigger, .cmd_valid, .cmd, .rd_load, .rd_shift,
      .chain_in(link[i]), .chain_out(link[i+1]),
      .fault_n(fault_n[i]), .sf_pwr_good(sf_pwr_good[i]), .pwr_en(pwr_en[i]),
      .recon_mode(recon_mode[i]), .fault_latched(fault_latched[i]),
      .fifo_count(fifo_count[i]), .overflow(overflow[i])
    );
  end

  // Readout protocol: a readout call is a load pulse followed by shifts;
  // loading and shifting in the same cycle is not a defined operation.
  a_load_xor_shift: assert property (@(posedge clk) disable iff (!rst_n) !(rd_load && rd_shift))
    else $error("rd_load and rd_shift high in the same cycle");

endmodule
