// End-to-end test of edu_machine through its front panel only.
// A four-word loader is keyed into the store with the panel buttons; the
// loader is then run to key in three test programs word by word from the
// input switches (one start press per word), and the programs are run in
// continuous mode with random operands: repeated-addition multiply, a bit
// counter using shift left and jump-on-carry, and a mixed program that
// writes subtract/AND/OR/add/shift-right results and a sign test into the
// store through register 5. Results are read back from the display outputs.
module tb_edu_machine;
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

  task automatic start_run(int limit = 20000);
    int n = 0;
    mode = MODE_CONTINUOUS; start_btn = 1; hold(); start_btn = 0;
    while (running && n < limit) begin @(negedge clk); n++; end
    check(!running, "program stopped at a halt");
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

  // program images are built twice so that forward labels resolve
  function automatic void build(int which);
    for (int pass = 0; pass < 2; pass++) begin
      code.delete();
      case (which)
        0: begin // multiply r1 * r2 by repeated addition into r3
          org = 'o100;
          emit('o301); emit('o000); emit('o302); emit('o203);
          mark("m_loop");
          emit('o200); emit('o242); emit('o351); emit(L("m_done"));
          emit('o103); emit('o241); emit('o130); emit('o232);
          emit('o346); emit(L("m_loop"));
          mark("m_done");
          emit('o103); emit('o000);
        end
        1: begin // count the one bits of the input into r3
          org = 'o200;
          emit('o301); emit('o203); emit('o344); emit(8);
          mark("c_loop");
          emit('o101); emit('o371); emit('o110);
          emit('o364); emit(L("c_skip")); emit('o223);
          mark("c_skip");
          emit('o234); emit('o200); emit('o244);
          emit('o351); emit(L("c_done"));
          emit('o346); emit(L("c_loop"));
          mark("c_done");
          emit('o103); emit('o377);
        end
        2: begin // mixed arithmetic, results stored from 370 upwards
          org = 'o300;
          emit('o345); emit('o370);
          emit('o301); emit('o000); emit('o302);
          emit('o101); emit('o252); emit('o170); emit('o225);   // a - b
          emit('o101); emit('o262); emit('o170); emit('o225);   // a & b
          emit('o101); emit('o272); emit('o170); emit('o225);   // a | b
          emit('o101); emit('o242); emit('o170); emit('o225);   // a + b
          emit('o370); emit('o170); emit('o225);                // {C, sum >> 1}
          emit('o101); emit('o252); emit('o352); emit(L("x_neg"));
          emit('o343); emit('o125); emit('o346); emit(L("x_join"));
          mark("x_neg");
          emit('o343); emit('o252);
          mark("x_join");
          emit('o173); emit('o225);                             // sign marker
          emit('o315); emit('o012);                             // no-ops
          emit('o101); emit('o252); emit('o361); emit(L("x_bad")); // taken if a != b
          emit('o344); emit('o001); emit('o346); emit(L("x_end"));
          mark("x_bad");
          emit('o344); emit('o002);
          mark("x_end");
          emit('o345); emit('o370); emit('o107); emit('o130);   // reload first result
          emit('o000);
        end
      endcase
    end
  endfunction

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] a, b;
    logic [8:0] s;
    release_all(); in0 = 0; mode = MODE_MANUAL; speed = 7;
    repeat (3) @(negedge clk); rst_n = 1; hold();

    // key in the loader at 000: halt, input to store, increment reg 5, jump 000
    set_reg(R_SA, 8'o000);
    key_word(8'o000); key_word(8'o307); key_word(8'o225); key_word(8'o346); key_word(8'o000);
    check(dut.u_store.mem[1] == 8'o307 && dut.u_store.mem[3] == 8'o346, "loader keyed in");

    // use the loader to key in each program
    for (int p = 0; p < 3; p++) begin
      build(p);
      set_reg(R_SA, 8'(org)); set_reg(R_PC, 8'o000);
      start_run();                          // stops at the loader's halt
      foreach (code[i]) begin in0 = code[i]; start_run(); end
      mode = MODE_MANUAL;
      for (int i = 0; i < code.size(); i++)
        check(dut.u_store.mem[org + i] == code[i], $sformatf("program %0d word %0d: %o vs %o", p, i, dut.u_store.mem[org + i], code[i]));
      check(regs[R_SA] == 8'(org + code.size()), "register 5 after loading");
    end

    // multiply
    for (int k = 0; k < 6; k++) begin
      a = 8'($urandom_range(0, 15)); b = 8'($urandom_range(0, 15));
      set_reg(R_PC, 8'o100); in0 = a; start_run();
      in0 = b; start_run();
      check(regs[R_ACC] == 8'(a * b), $sformatf("multiply %0d*%0d gave %0d", a, b, regs[R_ACC]));
    end

    // bit count, ends on the 377 halt
    for (int k = 0; k < 6; k++) begin
      a = 8'($urandom);
      set_reg(R_PC, 8'o200); in0 = a; start_run();
      check(regs[R_ACC] == 8'($countones(a)), $sformatf("bit count of %h", a));
      check(ir == 8'o377, "stopped on 377");
    end

    // mixed program
    for (int k = 0; k < 6; k++) begin
      a = 8'($urandom); b = (k == 2) ? a : 8'($urandom);
      set_reg(R_PC, 8'o300); in0 = a; start_run();
      in0 = b; start_run();
      s = {1'b0, a} + {1'b0, b};
      check(dut.u_store.mem['o370] == 8'(a - b), "subtract");
      check(dut.u_store.mem['o371] == (a & b), "and");
      check(dut.u_store.mem['o372] == (a | b), "or");
      check(dut.u_store.mem['o373] == s[7:0], "add");
      check(dut.u_store.mem['o374] == {s[8], s[7:1]}, "shift right brings carry in");
      check(dut.u_store.mem['o375] == ((8'(a - b) >> 7) ? 8'o252 : 8'o125), "jump on negative");
      check(regs[4] == ((a != b) ? 8'd2 : 8'd1), "jump if not zero");
      check(regs[3] == 8'(a - b), $sformatf("load from store through register 5: %o vs %o r4=%o a=%o b=%o", regs[3], 8'(a-b), regs[4], a, b));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
