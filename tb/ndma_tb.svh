// ndma_tb.svh: check macros shared by the NDMA testbenches. Each testbench
// declares "int checks, failures;" and uses CHECK to compare a value with the
// expected one, counting and reporting mismatches.
`ifndef NDMA_TB_SVH
`define NDMA_TB_SVH
`define CHECK(got, exp, what) \
  begin \
    checks++; \
    if ((got) !== (exp)) begin \
      failures++; \
      $display("FAIL %s: got %0h expected %0h (t=%0t)", what, got, exp, $time); \
    end \
  end
`define TB_DONE \
  begin \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
    $finish; \
  end
`endif
