// Common scoreboard for the self-checking testbenches: a check counter, a
// failure counter, a CHECK macro and the closing report.
int checks = 0;
int failures = 0;

`define CHECK(cond, msg) \
  begin checks++; if (!(cond)) begin failures++; \
    if (failures < 20) $display("FAIL %s (t=%0t)", msg, $time); end end

task automatic finish_tb();
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
endtask

`define WATCHDOG(clk_sig, ncycles) \
  initial begin repeat (ncycles) @(posedge clk_sig); failures++; \
    $display("FAIL watchdog expired"); finish_tb(); end
