// tb_tps2552_model: checks the power switch model. Output follows EN with no
// short; a short drops the output at once; a short shorter than the deglitch
// time raises no fault; a lasting short pulls FAULT low after the deglitch
// time (checked against the default 7.5 ms, inside the 10 ms budget); taking
// EN low ends the over-current and releases FAULT.
module tb_tps2552_model;
  logic vin_ok, en, load_short, vout_ok, fault_n;
  int checks = 0, failures = 0;
  realtime t0, t_fault;

  tps2552_model dut (.*);

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("mismatch: %s at %0t", what, $time); end
  endtask

  initial begin
    vin_ok = 1; en = 0; load_short = 0;
    #1us;
    check("off when disabled", !vout_ok && fault_n);
    en = 1; #1us;
    check("on when enabled", vout_ok && fault_n);
    load_short = 1; #1ns;
    check("current limit drops output", !vout_ok);
    #5ms;
    check("no fault before deglitch", fault_n);
    load_short = 0; #10us;
    check("short removed", vout_ok && fault_n);
    #3ms;
    check("short pulse raised no fault", fault_n);
    load_short = 1; t0 = $realtime;
    wait (!fault_n); t_fault = $realtime;
    check("fault after deglitch time", (t_fault - t0) >= 7.4ms && (t_fault - t0) <= 7.6ms);
    check("fault within 10 ms", (t_fault - t0) < 10ms);
    en = 0; #2us;
    check("EN low releases fault", fault_n && !vout_ok);
    $display("fault reported %0.3f ms after the short", (t_fault - t0) / 1ms);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
