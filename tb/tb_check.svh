// Check counting shared by the self-checking testbenches.
//
// A testbench declares `int checks, failures`. CHECK(cond, msg) counts one
// check and, when cond is false, one failure with a message stamped with the
// simulation time. TB_DONE prints the summary line
// "TB_RESULT checks=N failures=M" and ends the simulation. Both are plain
// procedural statements with no timing of their own.
`define CHECK(cond, msg) \
  begin checks++; if (!(cond)) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end end
`define TB_DONE \
  begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
