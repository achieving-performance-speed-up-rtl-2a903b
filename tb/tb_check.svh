// tb_check.svh: shared checking helpers of the testbenches.
//
// Each testbench declares `int checks, failures;`. TB_CHECK counts one check
// and, if the condition is false, one failure, printing the first few
// messages. TB_FINISH prints the result line and ends the simulation.
`ifndef TB_CHECK_SVH
`define TB_CHECK_SVH

`define TB_CHECK(cond, msg) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      if (failures <= 10) $display("FAIL t=%0t: %s", $time, msg); \
    end \
  end

`define TB_FINISH \
  begin \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
    $finish; \
  end

`endif
