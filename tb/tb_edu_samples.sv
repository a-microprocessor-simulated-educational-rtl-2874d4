// Test of edu_machine on the kinds of small program the machine was built to
// demonstrate, each written here from its stated purpose and keyed in
// through the front panel:
//   * store examination: show successive store words in the accumulator,
//     halting after each, from an address set by hand in register 5;
//   * pattern recognition: keep a pattern taken from the switches and, while
//     the switches still match it, flash registers 1-4 (complement them on
//     every pass); once the switches differ, clear registers 1-4;
//   * parity conversion: take seven data bits from the switches and show
//     them in the accumulator with bit 8 set for even parity, then halt for
//     fresh data;
//   * 4-bit multiplication: take two numbers from the switches at two
//     halts, keep their low four bits and multiply them by shift and add,
//     showing the product in the accumulator.
// Operands are random; expected results are computed here.
module tb_edu_samples;
  import edu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] in0;
  logic [3:0] fn_btn, alufn_btn; logic [6:0] regsel_btn;
  logic [7:0] rtb_btn, btr_btn; logic in0_bus_btn, alu_in_btn, ltoa_btn, shl_btn, shr_btn;
  logic [2:0] sa_btn; logic [1:0] ir_btn;
  mode_e mode; logic [2:0] speed; logic start_btn, stop_btn;
  logic [6:0][7:0] regs; logic [7:0] bus, sar, ir, alu_result, state;
  decoded_t dec; alu_fn_e alu_fn; logic [2:0] flags; gates_t gate_lamps;
  logic alarm, running;
  int checks = 0, failures = 0;

  edu_machine #(.DELAY_BASE(8), .FLASH_LOG2(3)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

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

  // write v at the address in register 5, then step register 5 on
  task automatic key_word(logic [7:0] v);
    in0 = v; sa_btn[1] = 1; in0_bus_btn = 1; btr_btn[R_STORE] = 1; push();
    fn_btn[ROP_INC] = 1; regsel_btn[R_SA] = 1; push();
  endtask

  // start in continuous mode and wait for the next halt
  task automatic run_to_halt(string what, int limit = 50000);
    int n = 0;
    mode = MODE_CONTINUOUS; start_btn = 1; hold(); start_btn = 0;
    while (running && n < limit) begin @(negedge clk); n++; end
    check(!running, {what, ": stopped at a halt"});
    hold();
  endtask

  // ---------------- tiny assembler ----------------
  logic [7:0] code[$];
  int org;
  int lbl[string];
  function automatic int here(); return org + code.size(); endfunction
  function automatic void emit(int b); code.push_back(8'(b)); endfunction
  function automatic int L(string n); return lbl.exists(n) ? lbl[n] : 0; endfunction
  function automatic void mark(string n); lbl[n] = here(); endfunction

  function automatic void build(int which);
    for (int pass = 0; pass < 2; pass++) begin
      code.delete();
      case (which)
        0: begin // store examination
          org = 'o020;
          mark("e_top");
          emit('o117); emit('o101); emit('o000); emit('o225);
          emit('o346); emit(L("e_top"));
        end
        1: begin // pattern recognition, pattern kept in register 5
          org = 'o100;
          emit('o000); emit('o305);
          mark("p_loop");
          emit('o300); emit('o255); emit('o361); emit(L("p_diff"));
          emit('o211); emit('o212); emit('o213); emit('o214);
          emit('o346); emit(L("p_loop"));
          mark("p_diff");
          emit('o201); emit('o202); emit('o203); emit('o204);
          emit('o346); emit(L("p_loop"));
        end
        2: begin // even parity in bit 8
          org = 'o200;
          mark("q_top");
          emit('o000); emit('o300); emit('o342); emit('o177); emit('o262);
          emit('o110); emit('o203);
          mark("q_loop");
          emit('o371); emit('o364); emit(L("q_zero")); emit('o223);
          mark("q_zero");
          emit('o260); emit('o361); emit(L("q_loop"));
          emit('o103); emit('o342); emit('o001); emit('o262); emit('o101);
          emit('o351); emit(L("q_show"));
          emit('o342); emit('o200); emit('o272);
          mark("q_show");
          emit('o346); emit(L("q_top"));
        end
        3: begin // 4-bit multiply, MSB of the multiplier first
          org = 'o300;
          mark("m_top");
          emit('o000); emit('o300); emit('o342); emit('o017); emit('o262);
          emit('o110);
          emit('o000); emit('o300); emit('o262);
          emit('o371); emit('o371); emit('o371); emit('o371); emit('o130);
          emit('o204); emit('o342); emit('o374);
          mark("m_loop");
          emit('o104); emit('o244); emit('o140);
          emit('o103); emit('o371); emit('o130);
          emit('o364); emit(L("m_noadd"));
          emit('o104); emit('o241); emit('o140);
          mark("m_noadd");
          emit('o222); emit('o102); emit('o260); emit('o361); emit(L("m_loop"));
          emit('o104); emit('o346); emit(L("m_top"));
        end
      endcase
    end
  endfunction

  task automatic load_program(int which);
    build(which);
    set_reg(R_SA, 8'(org));
    foreach (code[i]) key_word(code[i]);
    for (int i = 0; i < code.size(); i++)
      check(dut.u_store.mem[org + i] == code[i], $sformatf("program %0d word %0d keyed", which, i));
  endtask

  initial begin : watchdog
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] data [8];
    logic [7:0] pat, v, exp;
    logic [3:0] a, b;
    bit seen0, seen1;
    int n;
    release_all(); in0 = 0; mode = MODE_MANUAL; speed = 7;
    repeat (3) @(negedge clk); rst_n = 1; hold();

    // ---- store examination ----
    load_program(0);
    set_reg(R_SA, 8'o040);
    for (int i = 0; i < 8; i++) begin data[i] = 8'($urandom); key_word(data[i]); end
    set_reg(R_SA, 8'o040); set_reg(R_PC, 8'o020);
    for (int i = 0; i < 8; i++) begin
      run_to_halt("examine");
      check(regs[R_ACC] == data[i], $sformatf("examine word %0d: %o, expected %o", i, regs[R_ACC], data[i]));
      check(regs[R_SA] == 8'(8'o040 + i), "examine address in register 5");
    end

    // ---- pattern recognition ----
    load_program(1);
    for (int r = 1; r <= 4; r++) set_reg(r, 8'h00);
    pat = 8'($urandom);
    set_reg(R_PC, 8'o100);
    run_to_halt("pattern: first halt");
    in0 = pat;
    mode = MODE_CONTINUOUS; start_btn = 1; hold(); start_btn = 0;
    seen0 = 0; seen1 = 0;
    for (n = 0; n < 6000; n++) begin
      @(negedge clk);
      if (state == ST8 && regs[R_PC] == 8'o102)
        check(regs[1] == regs[4] && regs[2] == regs[4] && regs[3] == regs[4],
              "registers 1-4 flash together");
      if (regs[1] == 8'h00) seen0 = 1;
      if (regs[1] == 8'hFF) seen1 = 1;
    end
    check(seen0 && seen1, "pattern match flashes registers 1-4");
    check(running, "pattern routine keeps running");
    in0 = pat ^ (8'h01 << ($urandom % 8));
    repeat (3000) @(negedge clk);
    for (int r = 1; r <= 4; r++) check(regs[r] == 8'h00, $sformatf("register %0d cleared on mismatch", r));
    stop_btn = 1;
    for (n = 0; n < 2000 && running; n++) @(negedge clk);
    stop_btn = 0; hold();
    check(!running && state == ST8, "pattern routine stopped at end of instruction");

    // ---- parity conversion ----
    load_program(2);
    set_reg(R_PC, 8'o200);
    run_to_halt("parity: first halt");
    for (int t = 0; t < 12; t++) begin
      v = (t == 0) ? 8'h00 : (t == 1) ? 8'hFF : 8'($urandom);
      in0 = v;
      run_to_halt("parity");
      exp = {^v[6:0], v[6:0]};
      check(regs[R_ACC] == exp, $sformatf("parity of %o: got %o, expected %o", v, regs[R_ACC], exp));
      check(^regs[R_ACC] == 1'b0, "accumulator has even parity");
    end

    // ---- 4-bit multiplication ----
    load_program(3);
    set_reg(R_PC, 8'o300);
    run_to_halt("multiply: first halt");
    for (int t = 0; t < 10; t++) begin
      a = (t == 0) ? 4'hF : 4'($urandom);
      b = (t == 0) ? 4'hF : 4'($urandom);
      in0 = {4'($urandom), a};
      run_to_halt("multiply: first operand");
      in0 = {4'($urandom), b};
      run_to_halt("multiply: product");
      check(regs[R_ACC] == 8'(a * b), $sformatf("%0d x %0d: got %0d", a, b, regs[R_ACC]));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
