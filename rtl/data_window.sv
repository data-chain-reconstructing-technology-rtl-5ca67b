// data_window: gathers the hits of one triggered event.
//
// On a trigger the block opens a window of cfg_window clock cycles on the
// delayed hit stream and ORs every sample inside it, so a strip that fired at
// any time in the window is marked hit. When the window closes the pattern is
// handed on, tagged with the event number, as a one-cycle ev_valid pulse.
//
// Interface: trigger is a one-cycle pulse. The samples of hits_dly at the
// trigger edge and the cfg_window-1 following edges are ORed (1 <= cfg_window
// <= MAX_WIN; 0 is treated as 1). ev_valid rises at the edge after the last
// sample. A trigger that arrives while a window is open is ignored; the event
// number counts the windows that were opened, starting at 0 after reset.
//
// The original design only names the block; the OR over a programmable window and
// the event numbering are this design's choices.
module data_window
  import mudc_pkg::*;
#(
  parameter int unsigned MAX_WIN = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [$clog2(MAX_WIN+1)-1:0] cfg_window,
  input  logic                         trigger,
  input  hits_t                        hits_dly,
  output logic                         busy,       // window open
  output logic                         ev_valid,
  output event_t                       ev,
  output logic [EVT_W-1:0]             evt_next    // number the next event gets
);

  localparam int unsigned CW = $clog2(MAX_WIN+1);

  logic [CW-1:0]    left;      // samples still to take
  logic [CW-1:0]    win;
  hits_t            acc;
  logic [EVT_W-1:0] evt_cnt;

  assign evt_next = evt_cnt;

  always_comb win = (cfg_window == 0) ? CW'(1) : (cfg_window > CW'(MAX_WIN) ? CW'(MAX_WIN) : cfg_window);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      left     <= '0;
      acc      <= '0;
      evt_cnt  <= '0;
      ev_valid <= 1'b0;
      ev       <= '0;
    end else begin
      ev_valid <= 1'b0;
      if (!busy) begin
        if (trigger) begin
          if (win == 1) begin
            ev_valid <= 1'b1;
            ev       <= '{evt: evt_cnt, hits: hits_dly};
            evt_cnt  <= evt_cnt + 1'b1;
          end else begin
            busy <= 1'b1;
            acc  <= hits_dly;
            left <= win - 1'b1;
          end
        end
      end else begin
        if (left == 1) begin
          busy     <= 1'b0;
          ev_valid <= 1'b1;
          ev       <= '{evt: evt_cnt, hits: acc | hits_dly};
          evt_cnt  <= evt_cnt + 1'b1;
        end else begin
          acc <= acc | hits_dly;
        end
        left <= left - 1'b1;
      end
    end
  end

endmodule
