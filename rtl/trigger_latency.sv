// trigger_latency: delays the 16 digitized RPC channels by the trigger latency.
//
// The trigger reaches a card some time after the particle crossed the chamber.
// This block keeps the recent history of the hit inputs in a circular buffer
// and presents the hits that were sampled cfg_latency clock cycles earlier, so
// that the data window that follows looks at the hits belonging to the
// triggered crossing.
//
// Interface: hits_in is sampled on every rising clk edge; hits_dly, sampled at
// the same edge, equals hits_in as sampled cfg_latency edges earlier
// (1 <= cfg_latency <= MAX_LAT; 0 is treated as 1, larger values as MAX_LAT).
// MAX_LAT must be a power of two. The buffer is cleared by
// the asynchronous active-low reset, so an empty history reads as no hits.
//
// The original design only names the block; the circular buffer, its depth and the
// programmable latency are this design's choices.
module trigger_latency
  import mudc_pkg::*;
#(
  parameter int unsigned MAX_LAT = 64
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [$clog2(MAX_LAT+1)-1:0] cfg_latency,
  input  hits_t                        hits_in,
  output hits_t                        hits_dly
);

  localparam int unsigned AW = $clog2(MAX_LAT);

  hits_t          buf_q [MAX_LAT];
  logic [AW-1:0]  wp;
  logic [AW-1:0]  rp;
  localparam int unsigned LW = $clog2(MAX_LAT+1);
  logic [LW-1:0]  lat;

  // Latency L: the sample written L-1 slots before the current write slot is
  // registered now and seen at the next edge, L edges after it was taken.
  always_comb begin
    lat = (cfg_latency == 0) ? LW'(1) : (cfg_latency > LW'(MAX_LAT) ? LW'(MAX_LAT) : cfg_latency);
    rp  = wp - AW'(lat - LW'(1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      hits_dly <= '0;
      for (int i = 0; i < MAX_LAT; i++) buf_q[i] <= '0;
    end else begin
      buf_q[wp] <= hits_in;
      hits_dly  <= (lat == LW'(1)) ? hits_in : buf_q[rp];
      wp        <= wp + 1'b1;
    end
  end

endmodule
