// tb_chain_shift_register: three stages connected as a chain. After a common
// load and 3*W shifts the last stage must have produced the three loaded words,
// last stage first and MSB first, followed by the bits fed into the first
// stage. Hold (no shift) and load priority over shift are checked as well.
module tb_chain_shift_register;
  localparam int unsigned W = 12;

  logic clk = 0, rst_n = 0, load, shift, ser_in;
  logic [W-1:0] par [3];
  logic [3:0] link;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < 3; i++) begin : g
    chain_shift_register #(.W(W)) dut (.clk, .rst_n, .load, .shift, .par_in(par[i]),
                                       .ser_in(link[i]), .ser_out(link[i+1]));
  end
  assign link[0] = ser_in;

  always #12.5ns clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; shift = 0; ser_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      logic [4*W-1:0] exp_bits, in_bits;
      foreach (par[i]) par[i] = W'($urandom);
      in_bits  = {W{1'b0}} | ($urandom);
      exp_bits = {par[2], par[1], par[0], in_bits[W-1:0]};
      load = 1; shift = 1;  // load must win over shift
      @(negedge clk);
      load = 0;
      for (int b = 0; b < 4 * W; b++) begin
        ser_in = in_bits[W-1 - (b % W)];
        shift = ($urandom_range(0, 3) != 0);
        checks++;
        if (link[3] !== exp_bits[4*W-1 - b]) begin
          failures++;
          if (failures < 10) $display("round %0d bit %0d got %b exp %b", r, b, link[3], exp_bits[4*W-1-b]);
        end
        // hold the check position while shift is low
        while (!shift) begin
          @(negedge clk);
          checks++;
          if (link[3] !== exp_bits[4*W-1 - b]) failures++;
          shift = 1;
        end
        if (b >= 3 * W) ser_in = 0;
        @(negedge clk);
      end
      shift = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
