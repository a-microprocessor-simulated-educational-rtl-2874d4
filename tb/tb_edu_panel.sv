// Self-checking test of edu_panel: gate buttons, only-one rules and the
// alarm with flashing lamps, once-per-press actions, debouncing, and the
// panel being dead while the machine runs.
module tb_edu_panel;
  import edu_pkg::*;
  logic clk = 0, rst_n = 0, active;
  logic [3:0] fn_btn, alufn_btn; logic [6:0] regsel_btn;
  logic [7:0] rtb_btn, btr_btn; logic in0_bus_btn, alu_in_btn, ltoa_btn, shl_btn, shr_btn;
  logic [2:0] sa_btn; logic [1:0] ir_btn;
  gates_t gates, lamps; pulses_t pulses; logic alarm;
  int checks = 0, failures = 0;
  int n_regop = 0, n_shl = 0, n_ltoa = 0;

  edu_panel #(.FLASH_LOG2(2)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (pulses.reg_op) n_regop += $countones(pulses.op_mask);
    if (pulses.shift_l) n_shl++;
    if (gates.alu_to_acc) n_ltoa++;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  task automatic release_all();
    {fn_btn, alufn_btn, regsel_btn, rtb_btn, btr_btn, in0_bus_btn, alu_in_btn,
     ltoa_btn, shl_btn, shr_btn, sa_btn, ir_btn} = '0;
  endtask

  task automatic settle(); repeat (4) @(negedge clk); endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen_on, seen_off;
    release_all(); active = 1;
    repeat (2) @(posedge clk); rst_n = 1;
    // one bus source, several destinations
    rtb_btn = 8'b0000_0100; btr_btn = 8'b1000_0011; settle();
    check(gates.reg_to_bus == 8'b100 && gates.bus_to_reg == 8'b1000_0011 && !alarm, "gates open");
    check(lamps.reg_to_bus == 8'b100, "lamp of the gate");
    // two bus sources: alarm, nothing acts, lamps flash
    in0_bus_btn = 1; settle();
    check(alarm && gates == GATES_CLOSED, "two sources alarm");
    seen_on = 0; seen_off = 0;
    repeat (16) begin @(negedge clk); if (lamps.in0_to_bus) seen_on = 1; else seen_off = 1; end
    check(seen_on && seen_off, "lamps flash during alarm");
    release_all(); settle();
    check(!alarm && gates == GATES_CLOSED, "released");
    // register operation, once per press
    fn_btn = 4'b0100; regsel_btn = 7'b000_0010; settle(); settle();
    check(n_regop == 1, "one increment per press");
    regsel_btn = 7'b000_0110; settle();
    check(n_regop == 2, "newly pressed register operated once");
    regsel_btn = 0; settle(); regsel_btn = 7'b000_0010;
    @(negedge clk); @(negedge clk); @(negedge clk); #1;
    check(pulses.reg_op && pulses.op_mask == 7'b10 && pulses.op_fn == ROP_INC, "pulse contents");
    release_all(); settle();
    // two function buttons are ignored silently
    fn_btn = 4'b0011; regsel_btn = 7'b1; settle();
    check(n_regop == 3 && !alarm, "two functions ignored");
    release_all(); settle();
    // debouncing: a one-cycle blip does nothing
    regsel_btn = 7'b1; fn_btn = 4'b0001; settle();
    check(n_regop == 4, "clear operated");
    regsel_btn = 0; @(negedge clk); regsel_btn = 7'b1; settle();
    check(n_regop == 4, "one-cycle release ignored");
    release_all(); settle();
    // shift and ALU-to-accumulator once per press
    shl_btn = 1; settle(); settle();
    check(n_shl == 1, "shift once");
    shl_btn = 0; settle(); ltoa_btn = 1; settle(); settle();
    check(n_ltoa == 1, "ALU to accumulator once");
    // accumulator group exclusive with bus-to-accumulator
    btr_btn = 8'b1; settle();
    check(alarm, "load accumulator and ALU result together");
    release_all(); settle();
    // every pair from the accumulator group raises the alarm
    for (int i = 0; i < 4; i++)
      for (int j = i + 1; j < 4; j++) begin
        logic [3:0] g;
        g = 4'b0; g[i] = 1; g[j] = 1;
        {btr_btn[0], ltoa_btn, shl_btn, shr_btn} = g; settle();
        check(alarm && !pulses.shift_l && !pulses.shift_r && !gates.alu_to_acc,
              $sformatf("accumulator group pair %b", g));
        release_all(); settle();
      end
    // ALU function
    alufn_btn = 4'b0100; settle();
    check(pulses.alu_fn_load && pulses.alu_fn == ALU_AND, "ALU function AND");
    alufn_btn = 4'b1010; settle();
    check(alarm && !pulses.alu_fn_load, "two ALU functions");
    release_all();
    // store address and instruction sources
    sa_btn = 3'b010; ir_btn = 2'b10; settle();
    check(gates.sa_src == SA_REG5 && gates.ir_src == IR_IN0, "sources");
    sa_btn = 3'b101; settle();
    check(alarm, "two store address sources");
    release_all(); ir_btn = 2'b11; settle();
    check(alarm, "two instruction sources");
    release_all(); alu_in_btn = 1; settle();
    check(gates.bus_to_alu, "bus to ALU");
    // dead while running
    active = 0; rtb_btn = 8'h01; fn_btn = 4'b1; regsel_btn = 7'h7f; settle();
    check(gates == GATES_CLOSED && !pulses.reg_op && lamps == GATES_CLOSED, "inactive");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
