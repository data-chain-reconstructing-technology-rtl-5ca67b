// data_reconstruction: stands in for the SRAM FPGA of a disconnected card.
//
// When the card is in reconstruction mode its own data is lost. To keep the
// serial stream in the normal format, this stage loads, at every readout
// call, a frame of the normal length whose hit bits are all 0 and whose header
// carries the fault flag, the card position and the event number. It then
// shifts exactly like the SRAM FPGA's stage, passing on the frames of the
// previous cards, so the cards before a dead one are read out unharmed.
//
// Interface: rd_load and rd_shift are the chain's common readout controls.
// The event number is the count of rd_load pulses since reset, which equals
// the SRAM FPGA's event number as long as every event is read exactly once.
// It runs in every mode, so it stays aligned while the card is healthy.
//
// The original design gives the zero filling and the fault flag; the header layout and
// counting readout calls for the event number are this design's choices.
module data_reconstruction
  import mudc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [FEC_ID_W-1:0] fec_id,
  input  logic                rd_load,
  input  logic                rd_shift,
  input  logic                chain_in,
  output logic                chain_out
);

  logic [EVT_W-1:0] rd_cnt;
  frame_t           frame;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       rd_cnt <= '0;
    else if (rd_load) rd_cnt <= rd_cnt + 1'b1;
  end

  always_comb begin
    frame.hdr.fault  = 1'b1;
    frame.hdr.fec_id = fec_id;
    frame.hdr.evt    = rd_cnt;
    frame.hits       = '0;
  end

  chain_shift_register #(.W(FRAME_W)) u_shift (
    .clk, .rst_n, .load(rd_load), .shift(rd_shift),
    .par_in(frame), .ser_in(chain_in), .ser_out(chain_out)
  );

endmodule
