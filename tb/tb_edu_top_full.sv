// Full-size end-to-end test: the scenario of tb_edu_top on edu_top built
// from its default parameters (2 s per state at the slowest speed, visible
// flash rate), so the machine is run at speed 7, where there is no delay.
module tb_edu_top_full;
  import edu_pkg::*;
  localparam bit FULL = 1;
`include "edu_top_scenario.svh"
  edu_top dut (.*);
endmodule
