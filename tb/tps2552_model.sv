// tps2552_model: behavioural model of the current-limited power-distribution
// switch that feeds the SRAM FPGA, the threshold DAC and the comparators of a
// front-end card, used by the testbenches. It is a simulation model, not
// synthesizable logic: the real part is an analog device.
//
// Behaviour modelled: with IN present and EN high the output is on. A short
// circuit on the load makes the switch limit its current, so the output rail
// collapses at once (vout_ok low); if the over-current lasts for the deglitch
// time the open-drain FAULT output is pulled low, and it is released as soon as
// the over-current ends (for instance because EN was taken low). The switch
// itself does not latch off: keeping the supply off is the job of the
// anti-fuse FPGA, which latches the fault and holds EN low.
//
// Ports follow the part's pins: vin_ok (IN), en (EN), vout_ok (OUT), fault_n
// (FAULT). load_short is not a pin: it stands for a short circuit on the
// switched rail. EN is taken as active high. The deglitch time defaults to
// 7.5 ms, the part's typical over-current deglitch; a fault therefore cuts the
// card's supply well within the 10 ms observed for the real board.
module tps2552_model #(
  parameter int unsigned DEGLITCH_US = 7500   // over-current deglitch time in microseconds
) (
  input  logic vin_ok,     // IN: 5 V or 3.3 V supply present
  input  logic en,         // EN: control from the anti-fuse FPGA
  input  logic load_short, // short circuit on the switched rail
  output logic vout_ok,    // OUT: switched supply within limits
  output logic fault_n     // FAULT: active-low fault report to the anti-fuse FPGA
);

  logic        overcur;
  int unsigned waited;  // microseconds of over-current so far

  assign overcur = vin_ok && en && load_short;
  assign vout_ok = vin_ok && en && !load_short;

  initial begin
    fault_n = 1'b1;
    forever begin
      wait (overcur);
      waited = 0;
      while (overcur && waited < DEGLITCH_US) begin
        #1us;
        waited++;
      end
      if (overcur) begin
        fault_n = 1'b0;
        wait (!overcur);
        fault_n = 1'b1;
      end
    end
  end

endmodule
