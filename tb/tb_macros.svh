// tb_macros.svh: check and result helpers shared by the testbenches.
// CHECK(cond, msg) counts one check and, if cond is false, one failure.
`ifndef TB_MACROS_SVH
`define TB_MACROS_SVH
`define CHECK(cond, msg) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      $display("FAIL %s (t=%0t)", msg, $time); \
    end \
  end
`define TB_FINISH \
  begin \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
    $finish; \
  end
`endif
