// data_fifo_bank: event buffer of the SRAM FPGA.
//
// Events gathered by the data window wait here until the readout module calls
// for them. It is a synchronous first-in first-out store of event records
// (event number and 16 hit bits; one bit column per channel, hence a bank).
//
// Interface: wr_en writes wr_data at the clock edge unless the store is full,
// in which case the event is dropped and the sticky overflow flag is set.
// rd_data always shows the oldest entry (first-word fall-through); rd_en
// removes it at the edge and is ignored when empty. A write and a read in the
// same cycle are both served. count gives the number of stored events.
//
// The original design keeps events in FIFOs until readout; the depth, the
// fall-through read and the drop-on-full policy are this design's choices.
module data_fifo_bank
  import mudc_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  event_t                     wr_data,
  input  logic                       rd_en,
  output event_t                     rd_data,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       overflow
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  event_t        mem [DEPTH];
  logic [AW-1:0] wp, rp;

  logic do_wr, do_rd;

  always_comb begin
    empty   = (count == 0);
    full    = (count == CW'(DEPTH));
    do_wr   = wr_en && !full;
    do_rd   = rd_en && !empty;
    rd_data = mem[rp];
  end

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wp <= inc(wp);
      if (do_rd) rp <= inc(rp);
      count <= count + CW'(do_wr) - CW'(do_rd);
      if (wr_en && full) overflow <= 1'b1;
    end
  end

  a_count_in_range: assert property (@(posedge clk) disable iff (!rst_n) count <= CW'(DEPTH))
    else $error("FIFO count %0d above depth", count);

endmodule
