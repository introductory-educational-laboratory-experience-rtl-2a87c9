// tb_check.svh: bookkeeping shared by the self-checking testbenches.
// Declares the check and failure counters and provides CHECK_EQ, which
// compares a value with its expected value, counts the check and prints
// the first mismatches. TB_FINISH prints the summary line and ends the run.
`ifndef TB_CHECK_SVH
`define TB_CHECK_SVH

`define TB_COUNTERS \
  int checks = 0; \
  int failures = 0;

`define CHECK_EQ(got, exp, what) \
  begin \
    checks++; \
    if ((got) !== (exp)) begin \
      failures++; \
      if (failures <= 10) \
        $display("MISMATCH %s: got %0d expected %0d at %0t", what, (got), (exp), $time); \
    end \
  end

`define TB_FINISH \
  begin \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
    $finish; \
  end

`define TB_WATCHDOG(cycles) \
  initial begin \
    repeat (cycles) @(posedge clk); \
    failures++; \
    $display("watchdog expired"); \
    `TB_FINISH \
  end

`endif
