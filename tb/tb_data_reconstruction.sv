// tb_data_reconstruction: after each rd_load the stage must send, from the next
// cycle, a frame with the fault flag set, its position, the count of earlier
// readout calls as event number and sixteen 0 hit bits, then pass on the 32
// bits fed into chain_in.
module tb_data_reconstruction;
  import mudc_pkg::*;
  localparam logic [FEC_ID_W-1:0] ID = 4'd12;

  logic clk = 0, rst_n = 0;
  logic [FEC_ID_W-1:0] fec_id = ID;
  logic rd_load, rd_shift, chain_in, chain_out;
  int checks = 0, failures = 0;

  data_reconstruction dut (.*);

  always #12.5ns clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_load = 0; rd_shift = 0; chain_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int e = 0; e < 5; e++) begin
      frame_t exp;
      logic [FRAME_W-1:0] fed;
      exp = '{hdr: '{fault: 1'b1, fec_id: ID, evt: EVT_W'(e)}, hits: '0};
      fed = FRAME_W'($urandom);
      repeat ($urandom_range(0, 3)) @(negedge clk);
      rd_load = 1;
      @(negedge clk);
      rd_load = 0; rd_shift = 1;
      for (int b = 0; b < 2 * FRAME_W; b++) begin
        logic e_bit;
        chain_in = (b < FRAME_W) ? fed[FRAME_W-1 - b] : 1'b0;
        e_bit = (b < FRAME_W) ? exp[FRAME_W-1 - b] : fed[2*FRAME_W-1 - b];
        checks++;
        if (chain_out !== e_bit) begin
          failures++;
          if (failures < 10) $display("event %0d bit %0d got %b exp %b", e, b, chain_out, e_bit);
        end
        @(negedge clk);
      end
      rd_shift = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
