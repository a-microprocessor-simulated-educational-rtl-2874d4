// End-to-end test of edu_top. Both halves run at once:
//  - the educational computer is driven only through its panel: gate and
//    register buttons, the only-one alarm, a program keyed into the store
//    and run in one-bit, one-instruction and continuous modes, an
//    instruction executed straight from the input switches, stop and halt;
//  - the microprocessor system is driven by the 8008 bus-cycle model: PROM
//    and RAM cycles, input cycles, shift-register reads and writes that wait
//    for their word, single stepping and the interrupt.
// Every mechanism is counted as it happens; a mechanism that never happens
// is a failure. Here the state delay and the lamp flash are shortened; tb_edu_top_full
// runs the same scenario on the top with its default parameters.
module tb_edu_top;
  import edu_pkg::*;
  localparam bit FULL = 0;
`include "edu_top_scenario.svh"
  edu_top #(.DELAY_BASE(64), .FLASH_LOG2(3)) dut (.*);
endmodule
