// Shared body of tb_edu_top and tb_edu_top_full: signals, the 8008 bus
// model, mechanism counters and the scenario. The including module sets
// FULL and instantiates edu_top as dut after including this file.
  logic clk = 0, rst_n = 0;
  // machine panel
  logic [7:0] in0;
  logic [3:0] fn_btn, alufn_btn; logic [6:0] regsel_btn;
  logic [7:0] rtb_btn, btr_btn; logic in0_bus_btn, alu_in_btn, ltoa_btn, shl_btn, shr_btn;
  logic [2:0] sa_btn; logic [1:0] ir_btn;
  mode_e mode; logic [2:0] speed; logic start_btn, stop_btn;
  logic [6:0][7:0] regs; logic [7:0] bus, sar, ir, alu_result, state;
  decoded_t dec; alu_fn_e alu_fn; logic [2:0] flags; gates_t gate_lamps;
  logic alarm, running;
  // microprocessor side
  logic phi1, phi2, sync; logic [2:0] s; logic [7:0] cpu_dout, cpu_din; logic cpu_drive;
  logic ready, intr, run, step_btn, int_btn, auto_start;
  logic [7:0] rom_addr, rom_data; logic [3:0] rom_cs_n;
  logic [15:0][7:0] sw; logic [7:0] bit_lines; logic [31:0] word_lines; logic [4:0] scan_pos;
  logic t3a, wait_n, stop_n;

  int checks = 0, failures = 0;

  i8008_bus_model cpu (.phi1, .phi2, .sync, .s, .cpu_dout, .cpu_drive, .cpu_din, .ready, .intr);
  always #5 clk = ~clk;

  function automatic logic [7:0] rom_fn(int sock, logic [7:0] a);
    return 8'(a ^ (8'(sock) << 6) ^ 8'h3c);
  endfunction
  always_comb begin
    rom_data = 8'h00;
    for (int k = 0; k < 4; k++) if (!rom_cs_n[k]) rom_data = rom_fn(k, rom_addr);
  end

  task automatic check(logic ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  typedef enum int {
    M_MODE_ONE_BIT, M_MODE_ONE_INSTR, M_MODE_CONT, M_SKIP, M_JUMP_TAKEN,
    M_JUMP_NOT, M_HALT, M_STOP_FREEZE, M_STOP_END, M_ALARM, M_PANEL_REGOP,
    M_ALU_ADD, M_ALU_SUB, M_ALU_AND, M_ALU_OR, M_SHL, M_SHR, M_STORE_WR,
    M_IR_FROM_IN0, M_SA_FROM_IN0, M_DELAY,
    M_PROM_RD, M_RAM_WR, M_RAM_RD, M_INPUT, M_SR_RD, M_SR_WR, M_WAIT, M_T3A,
    M_STEP, M_INTR, M_DISPLAY, M_COUNT
  } mech_e;
  int mech [M_COUNT];
  logic [7:0] state_q;
  logic running_q;
  int idle_run;

  // sampled at the falling edge, between the design's clock edges
  always @(negedge clk) if (rst_n) begin
    state_q   <= state;
    running_q <= running;
    if (running) begin
      if (mode == MODE_ONE_BIT)    mech[M_MODE_ONE_BIT]++;
      if (mode == MODE_ONE_INSTR)  mech[M_MODE_ONE_INSTR]++;
      if (mode == MODE_CONTINUOUS) mech[M_MODE_CONT]++;
    end
    if (state_q == ST8 && state == ST4) mech[M_SKIP]++;
    if ((dec.ind_a[IA_JT] || dec.ind_a[IA_JF]) && state_q == ST1 && state == ST2) mech[M_JUMP_TAKEN]++;
    if ((dec.ind_a[IA_JT] || dec.ind_a[IA_JF]) && state_q == ST8 && state == ST4) mech[M_JUMP_NOT]++;
    if (running_q && !running && dec.ind_a[IA_HALT]) mech[M_HALT]++;
    if (running_q && !running && stop_btn && mode == MODE_CONTINUOUS) mech[M_STOP_END]++;
    if (running && stop_btn && mode == MODE_ONE_INSTR && state == state_q) idle_run++;
    else idle_run = 0;
    if (idle_run == 200) mech[M_STOP_FREEZE]++;
    if (alarm) mech[M_ALARM]++;
    if (!running && dut.u_machine.p.reg_op) mech[M_PANEL_REGOP]++;
    if (gate_lamps.bus_to_alu) mech[M_ALU_ADD + int'(alu_fn)]++;
    if (running && state_q != state && state_q != ST8 && speed != 7) mech[M_DELAY]++;
    if (gate_lamps.bus_to_reg[R_STORE]) mech[M_STORE_WR]++;
    if (gate_lamps.ir_src == IR_IN0) mech[M_IR_FROM_IN0]++;
    if (gate_lamps.sa_src == SA_IN0) mech[M_SA_FROM_IN0]++;
    if (!wait_n) mech[M_WAIT]++;
    if (t3a) mech[M_T3A]++;
    if (intr) mech[M_INTR]++;
    if (word_lines != 0) mech[M_DISPLAY]++;
  end
  always @(negedge clk) if (rst_n) begin
    if (dut.u_machine.p.shift_l) mech[M_SHL]++;
    if (dut.u_machine.p.shift_r) mech[M_SHR]++;
  end

  // ---------------- panel helpers ----------------
  task automatic release_all();
    {fn_btn, alufn_btn, regsel_btn, rtb_btn, btr_btn, in0_bus_btn, alu_in_btn,
     ltoa_btn, shl_btn, shr_btn, sa_btn, ir_btn, start_btn, stop_btn} = '0;
  endtask
  task automatic hold(); repeat (6) @(negedge clk); endtask
  task automatic push(); hold(); release_all(); hold(); endtask
  task automatic set_reg(int r, logic [7:0] v);
    in0 = v; in0_bus_btn = 1; btr_btn[r] = 1; push();
  endtask
  task automatic key_word(logic [7:0] v);
    in0 = v; sa_btn[1] = 1; in0_bus_btn = 1; btr_btn[R_STORE] = 1; push();
    fn_btn[ROP_INC] = 1; regsel_btn[R_SA] = 1; push();
  endtask
  task automatic wait_manual(int limit);
    int n = 0;
    while (running && n < limit) begin @(negedge clk); n++; end
    check(!running, "run ended");
  endtask
  task automatic press_start();
    start_btn = 1; hold(); start_btn = 0; hold();
  endtask

  // ---------------- educational computer side ----------------
  task automatic machine_side();
    logic [7:0] prog [$];
    logic [7:0] seen [$];
    release_all(); in0 = 0; mode = MODE_MANUAL; speed = 7;
    hold();
    // panel: register operations, ALU by hand, alarm
    set_reg(1, 8'd20);
    fn_btn[ROP_DEC] = 1; regsel_btn[1] = 1; push();
    check(regs[1] == 8'd19, "panel decrement");
    set_reg(R_ACC, 8'd100);
    rtb_btn[1] = 1; alu_in_btn = 1; alufn_btn[ALU_SUB] = 1; push();
    ltoa_btn = 1; push();
    check(regs[R_ACC] == 8'd81, "panel subtract");
    rtb_btn[1] = 1; rtb_btn[2] = 1; btr_btn[3] = 1; hold();
    check(alarm && regs[3] != 8'd100, "alarm on two sources, nothing moved");
    release_all(); hold(); hold();
    check(!alarm, "alarm clears");
    // store address straight from the switches, then a word read back
    in0 = 8'o377; sa_btn[0] = 1; push();
    check(sar == 8'o377, "store address from switches");
    // program at 040: count r1 down to zero, then ALU and shift work
    prog = '{8'o341, 8'o005,                   // 040 r1 = 5
             8'o231, 8'o200, 8'o241,           // 042 dec r1; clear acc; add r1
             8'o361, 8'o042,                   // 045 jump to 042 if not zero
             8'o342, 8'o017, 8'o343, 8'o300,   // 047 r2 = 017, r3 = 300
             8'o103, 8'o272, 8'o252,           // 053 acc = r3 | r2 - r2
             8'o371, 8'o370, 8'o130,           // 056 shl, shr, r3 = acc
             8'o262, 8'o000,                   // 061 and r2; halt
             8'o224, 8'o346, 8'o063};          // 063 loop: inc r4, jump 063
    set_reg(R_SA, 8'o040);
    foreach (prog[i]) key_word(prog[i]);
    // one-bit: first instruction from the switches (a no-op, so skipped)
    in0 = 8'o011; ir_btn[1] = 1; push();
    check(ir == 8'o011, "instruction register from switches");
    set_reg(R_PC, 8'o040);
    mode = MODE_ONE_BIT;
    for (int k = 0; k < 5; k++) begin
      press_start(); seen.push_back(state);
    end
    check(seen[0] == ST4 && seen[1] == ST5 && seen[4] == ST8,
          $sformatf("one-bit steps through a skipped instruction %p", seen));
    wait_manual(10);
    check(ir == 8'o341 && regs[R_PC] == 8'o041, "next instruction fetched");
    // one-instruction with stop held between states
    mode = MODE_ONE_INSTR; speed = FULL ? 3'd7 : 3'd2;
    start_btn = 1; hold(); start_btn = 0; stop_btn = 1;
    repeat (400) @(negedge clk);
    check(running, "frozen by stop");
    stop_btn = 0; wait_manual(100000);
    check(regs[1] == 8'd5, "load immediate");
    // continuous at speed 7 until the halt
    mode = MODE_CONTINUOUS; speed = 7;
    press_start(); wait_manual(100000);
    check(regs[1] == 0 && regs[3] == 8'o300 && regs[R_ACC] == 0, "program results");
    check(ir == 8'o000, "stopped on halt");
    // continuous loop ended by stop
    press_start(); repeat (3000) @(negedge clk);
    check(running, "loop runs");
    stop_btn = 1; wait_manual(10000); hold(); stop_btn = 0;
    check(state == ST8 && regs[4] > 0, "stopped at the end of an instruction");
    mode = MODE_MANUAL;
  endtask

  // ---------------- microprocessor side ----------------
  task automatic board_side();
    logic [7:0] d, v, a; logic [7:0] ram [256]; logic [7:0] srm [32];
    int w0;
    foreach (ram[i]) ram[i] = 0;
    foreach (srm[i]) srm[i] = 0;
    for (int g = 0; g < 16; g++) sw[g] = 8'($urandom);
    cpu.idle_state(); cpu.idle_state();
    check(intr, "start-up interrupt");
    for (int i = 0; i < 60; i++) begin
      int k;
      k = $urandom_range(0, 5);
      a = 8'($urandom); v = 8'($urandom);
      case (k)
        0: begin
          int sock; sock = $urandom_range(0, 3);
          cpu.cycle(2'b00, {6'(sock), a}, 8'h00, d);
          check(d == rom_fn(sock, a), "PROM read"); mech[M_PROM_RD]++;
        end
        1: begin cpu.cycle(2'b11, {6'o13, a}, v, d); ram[a] = v; mech[M_RAM_WR]++; end
        2: begin
          cpu.cycle(2'b00, {6'o13, a}, 8'h00, d);
          check(d == ram[a], "RAM read"); mech[M_RAM_RD]++;
        end
        3: begin
          cpu.cycle(2'b10, {6'o00, 4'h0, a[3:0]}, 8'h00, d);
          check(d == ((a[3:0] == 13 || a[3:0] == 14) ? 8'h00 : sw[a[3:0]]), "input");
          mech[M_INPUT]++;
        end
        4: begin cpu.cycle(2'b11, {6'o77, 3'b0, a[4:0]}, v, d); srm[a[4:0]] = v; mech[M_SR_WR]++; end
        default: begin
          cpu.cycle(2'b00, {6'o77, 3'b0, a[4:0]}, 8'h00, d);
          check(d == srm[a[4:0]], "shift register read"); mech[M_SR_RD]++;
        end
      endcase
    end
    // single step
    run = 0; w0 = cpu.cycles;
    fork
      cpu.cycle(2'b00, {6'o02, 8'o321}, 8'h00, d);
      begin repeat (300) @(negedge clk); step_btn = 1; repeat (3) @(negedge clk); step_btn = 0; end
    join
    check(d == rom_fn(2, 8'o321), "stepped read");
    mech[M_STEP]++;
    run = 1;
    // interrupt button
    int_btn = 1; repeat (3) @(negedge clk); int_btn = 0;
    cpu.idle_state(); cpu.idle_state();
    check(intr, "interrupt from the button");
    cpu.cycle(2'b00, 14'h0, 8'h00, d);
    check(!intr, "interrupt taken in the next cycle");
  endtask

  initial begin : watchdog
    repeat (FULL ? 30_000_000 : 5_000_000) @(posedge clk); failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (mech[i]) mech[i] = 0;
    run = 1; step_btn = 0; int_btn = 0; auto_start = 1; idle_run = 0;
    release_all(); in0 = 0; mode = MODE_MANUAL; speed = 7;
    for (int g = 0; g < 16; g++) sw[g] = 8'h00;
    repeat (3) @(negedge clk); rst_n = 1;
    fork
      machine_side();
      board_side();
    join
    begin : slow_instr
      // one instruction at a slow speed shows the delay between states; the
      // gap between the first two state changes must be at least the delay
      int unsigned gap, need;
      logic [7:0] st0;
      need = dut.DELAY_BASE >> (FULL ? 6 : 5);
      set_reg(R_PC, 8'o063); mode = MODE_ONE_INSTR; speed = FULL ? 3'd6 : 3'd5;
      press_start();
      st0 = state; gap = 0;
      while (state == st0 && gap < 8 * need + 100) begin @(negedge clk); gap++; end
      st0 = state; gap = 0;
      while (state == st0 && gap < 8 * need + 100) begin @(negedge clk); gap++; end
      check(gap >= need && gap <= need + 8,
            $sformatf("state delay %0d clocks, expected %0d", gap, need));
      wait_manual(12 * need + 1000); mode = MODE_MANUAL;
    end
    for (int m = 0; m < M_COUNT; m++) begin
      check(mech[m] > 0, $sformatf("mechanism %s never happened", mech_e'(m)));
    end
    for (int m = 0; m < M_COUNT; m++) $display("  %-18s %0d", mech_e'(m), mech[m]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
