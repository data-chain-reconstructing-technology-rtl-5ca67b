// chain_shift_register: one card's stage of the serial data chain.
//
// All cards of a chain are loaded together with their own frame, then shift
// in lock step: each stage sends its most significant bit to the next card
// and takes in the bit arriving from the previous card. After W shifts a
// stage holds the frame of the card before it, so the whole chain reads out
// through the last card as one long shift register, last card's frame first.
//
// Interface: load (priority) copies par_in at the clock edge; otherwise shift
// moves the register one place towards the MSB and takes ser_in into the LSB.
// ser_out is the MSB, valid right after the load edge. Cleared by reset.
//
// The original design describes a shift register that joins the card's data to the
// serial stream of the previous cards; the load/shift control is this
// design's choice. The same stage is used by the SRAM FPGA and by the data
// reconstruction of the anti-fuse FPGA.
module chain_shift_register #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         shift,
  input  logic [W-1:0] par_in,
  input  logic         ser_in,
  output logic         ser_out
);

  logic [W-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sr <= '0;
    else if (load)  sr <= par_in;
    else if (shift) sr <= {sr[W-2:0], ser_in};
  end

  assign ser_out = sr[W-1];

endmodule
