// sf_fpga: data path of the SRAM-based FPGA of a front-end card.
//
// The 16 digitized RPC channels pass through the trigger latency buffer; on a
// trigger the data window gathers the hits of the event, which are queued in
// the data FIFO bank with their event number. When the readout module calls
// for an event (rd_load), the oldest event is taken from the FIFO, framed
// with a header (fault flag 0, card position, event number) and loaded into
// the chain shift register, which then shifts it out (rd_shift) while taking
// in the frames of the previous cards from chain_in.
//
// Interface: one clock domain, asynchronous active-low reset (also held while
// the card's supply is cut). rd_load and rd_shift are common to all cards of a
// chain; chain_out is valid from the edge after rd_load and moves one bit per
// rd_shift cycle. If the FIFO is empty at rd_load the card sends a frame with
// no hits and the number the next event will get.
//
// The chain of blocks follows the original block diagram of the SRAM FPGA; the
// frame layout, the depths and the load/shift control are this design's own.
module sf_fpga
  import mudc_pkg::*;
#(
  parameter int unsigned MAX_LAT    = 64,
  parameter int unsigned MAX_WIN    = 16,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [$clog2(MAX_LAT+1)-1:0]    cfg_latency,
  input  logic [$clog2(MAX_WIN+1)-1:0]    cfg_window,
  input  logic [FEC_ID_W-1:0]             fec_id,
  input  hits_t                           hits,
  input  logic                            trigger,
  input  logic                            rd_load,
  input  logic                            rd_shift,
  input  logic                            chain_in,
  output logic                            chain_out,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count,
  output logic                            overflow
);

  hits_t            hits_dly;
  logic             ev_valid;
  event_t           ev;
  logic [EVT_W-1:0] evt_next;
  event_t           head;
  logic             empty;
  frame_t           frame;

  trigger_latency #(.MAX_LAT(MAX_LAT)) u_latency (
    .clk, .rst_n, .cfg_latency, .hits_in(hits), .hits_dly
  );

  data_window #(.MAX_WIN(MAX_WIN)) u_window (
    .clk, .rst_n, .cfg_window, .trigger, .hits_dly,
    .busy(), .ev_valid, .ev, .evt_next
  );

  data_fifo_bank #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .wr_en(ev_valid), .wr_data(ev), .rd_en(rd_load),
    .rd_data(head), .empty, .full(), .count(fifo_count), .overflow
  );

  always_comb begin
    frame.hdr.fault  = 1'b0;
    frame.hdr.fec_id = fec_id;
    frame.hdr.evt    = empty ? evt_next : head.evt;
    frame.hits       = empty ? '0 : head.hits;
  end

  chain_shift_register #(.W(FRAME_W)) u_shift (
    .clk, .rst_n, .load(rd_load), .shift(rd_shift),
    .par_in(frame), .ser_in(chain_in), .ser_out(chain_out)
  );

endmodule
