// Self-checking test of edu_mode. A small state counter (1..8, reset to 8 by
// to_manual) stands in for the microprogram. Checks each mode, the delay
// length at every speed, the stop button and the halt.
module tb_edu_mode;
  import edu_pkg::*;
  localparam int unsigned DB = 64;
  logic clk = 0, rst_n = 0;
  mode_e mode; logic [2:0] speed; logic start_btn, stop_btn, halt;
  logic step, running, to_manual, end_of_instr;
  int st;                     // 1..8
  int nsteps, last_step_t, t, interval;
  int checks = 0, failures = 0;

  assign end_of_instr = (st == 8);
  edu_mode #(.DELAY_BASE(DB)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    t++;
    if (to_manual) st <= 8;
    else if (step) begin
      st <= (st == 8) ? 1 : st + 1;
      nsteps++;
      interval = t - last_step_t;
      last_step_t = t;
    end
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  task automatic press_start();
    @(negedge clk) start_btn = 1; repeat (2) @(negedge clk); start_btn = 0; @(negedge clk);
  endtask

  task automatic wait_manual(int limit);
    int n = 0;
    while (running && n < limit) begin @(negedge clk); n++; end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int i0, i7;
    st = 8; t = 0; nsteps = 0; last_step_t = 0; interval = 0;
    mode = MODE_MANUAL; speed = 7; start_btn = 0; stop_btn = 0; halt = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // manual: start does nothing
    press_start(); repeat (5) @(negedge clk);
    check(nsteps == 0 && !running, "manual ignores start");
    // one-bit: one state per press, holding start gives only one
    mode = MODE_ONE_BIT;
    @(negedge clk) start_btn = 1; repeat (20) @(negedge clk);
    check(nsteps == 1 && st == 1 && running, "one state per press");
    start_btn = 0; @(negedge clk);
    for (int k = 2; k <= 8; k++) begin
      press_start(); repeat (3) @(negedge clk);
      check(nsteps == k && st == k, $sformatf("one-bit state %0d", k));
    end
    check(!running, "one-bit back to manual at state 8");
    // one-instruction: eight states per press, delay per speed
    mode = MODE_ONE_INSTR;
    for (int sp = 7; sp >= 0; sp--) begin
      speed = 3'(sp); nsteps = 0;
      press_start(); wait_manual(5000);
      check(nsteps == 8 && !running && st == 8, $sformatf("one instruction at speed %0d", sp));
      if (sp == 7) i7 = interval;
      else check(interval - i7 == int'(DB >> sp), $sformatf("delay at speed %0d: %0d", sp, interval - i7));
    end
    // stop freezes one-instruction mode between states
    speed = 2; nsteps = 0;
    press_start(); stop_btn = 1; repeat (50) @(negedge clk);
    i0 = nsteps; repeat (200) @(negedge clk);
    check(nsteps == i0 && i0 <= 2 && running, "stop freezes at the next state");
    stop_btn = 0; wait_manual(2000);
    check(nsteps == 8 && !running, "resumes after stop");
    // continuous: runs until stop at the end of an instruction
    mode = MODE_CONTINUOUS; speed = 6; nsteps = 0;
    press_start(); repeat (300) @(negedge clk);
    check(running && nsteps > 16, "continuous keeps running");
    stop_btn = 1; wait_manual(500); stop_btn = 0;
    check(!running && st == 8 && nsteps % 8 == 0, "stop at end of instruction");
    // continuous: halt at state 8
    speed = 7; nsteps = 0; halt = 1;
    press_start(); wait_manual(500);
    check(!running && nsteps == 8, "halt stops after the instruction");
    halt = 0;
    // selector to manual ends a run mid instruction, counter back to 8
    speed = 5; press_start(); repeat (20) @(negedge clk);
    mode = MODE_MANUAL; wait_manual(500); @(negedge clk);
    check(!running && st == 8, "selector to manual");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
