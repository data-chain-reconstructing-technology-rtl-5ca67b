// mudc_pkg: types and constants shared by the muon-chamber data-chain logic.
//
// Every front-end card (FEC) contributes one fixed-length frame per event to
// the serial data chain: a 16-bit header followed by the 16 channel hit bits.
// The header carries a fault flag, the card's position in the chain and an
// event number. A card whose SRAM FPGA is dead sends a frame of the same
// length and layout, with the hits zeroed and the fault flag set, so the
// readout sees an unchanged data format.
//
// From the original design: 16 channels per card, 16 cards per chain, zero filling
// plus a fault flag for a dead card. This design's own choices: the header
// layout (1 flag bit, 4 position bits, 11 event-number bits), the command
// encoding and the command word.
package mudc_pkg;

  localparam int unsigned N_CH     = 16;  // RPC strips (channels) per card
  localparam int unsigned FEC_ID_W = 4;   // chain position, 16 cards per chain
  localparam int unsigned EVT_W    = 11;  // event number carried in the header

  typedef logic [N_CH-1:0] hits_t;

  typedef struct packed {
    logic                fault;   // 1: frame regenerated by the anti-fuse FPGA
    logic [FEC_ID_W-1:0] fec_id;  // position of the card in the chain
    logic [EVT_W-1:0]    evt;     // event number
  } hdr_t;

  typedef struct packed {
    hdr_t  hdr;
    hits_t hits;
  } frame_t;

  localparam int unsigned FRAME_W = $bits(frame_t);  // 32 bits per card

  // Event record kept in the data FIFO bank: event number and hit pattern.
  typedef struct packed {
    logic [EVT_W-1:0] evt;
    hits_t            hits;
  } event_t;

  // Commands from the readout module to the anti-fuse FPGAs.
  typedef enum logic [1:0] {
    CMD_NOP     = 2'd0,
    CMD_BYPASS  = 2'd1,  // disconnect the card: cut its power, reconstruct its data
    CMD_RESTORE = 2'd2   // reconnect the card: clear the fault, power it again
  } cmd_op_e;

  typedef struct packed {
    cmd_op_e             op;
    logic                bcast;  // 1: addressed to every card of the chain
    logic [FEC_ID_W-1:0] addr;   // card position when bcast = 0
  } cmd_t;

endpackage
