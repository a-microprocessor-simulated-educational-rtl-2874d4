// Self-checking test of edu_control: every instruction class is stepped
// through its states and the state sequence, gates and one-cycle actions are
// compared with the microprogram table; jumps are tried with all flag values.
module tb_edu_control;
  import edu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic step, to_manual, flag_c, flag_n, flag_z;
  logic [7:0] ir, state;
  decoded_t dec;
  gates_t gates;
  pulses_t pulses;
  int checks = 0, failures = 0;

  edu_control dut (.*);
  // decoding for the stimulus comes from the decoder block
  edu_decoder u_dec (.clk, .rst_n, .ir_src(IR_IN0), .store_dout(8'h00), .in0(ir_in), .ir(ir_q), .dec);
  logic [7:0] ir_in, ir_q;
  assign ir = ir_q;

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected gates and actions in state k of instruction i (reference model).
  typedef struct {
    logic [7:0] rtb, btr; logic in0b, balu, atoa; sa_src_e sa; ir_src_e irs;
    logic pcinc, rop, shl, shr, fnl; logic [6:0] mask;
  } exp_t;

  function automatic exp_t expect_of(int k, logic [7:0] i, logic c, logic n, logic z);
    exp_t e = '{default: 0, sa: SA_NONE, irs: IR_NONE};
    int d1 = i >> 6, d2 = (i >> 3) & 7, d3 = i & 7;
    logic taken = (d1 == 3 && d2 == 5) ? |(3'(d3) & {c, n, z}) :
                  (d1 == 3 && d2 == 6) ? |(3'(d3) & ~{c, n, z}) : 1'b0;
    if (k == 5) e.sa = SA_PC;
    if (k == 6) e.irs = IR_STORE;
    if (k == 7) e.pcinc = 1;
    if (d1 == 1) begin
      if (k == 1) e.sa = SA_REG5;
      if (k == 3) begin e.rtb[d3] = 1; e.btr[d2] = 1; end
    end else if (d1 == 2 && d2 >= 4) begin
      if (k == 1) begin e.fnl = 1; e.sa = SA_REG5; e.rtb[d3] = 1; end
      if (k == 2) begin e.rtb[d3] = 1; e.balu = 1; end
      if (k == 4) e.atoa = 1;
    end else if (d1 == 2) begin
      if (k == 1 && d3 != 7) begin e.rop = 1; e.mask[d3] = 1; end
    end else if (d1 == 3 && d2 == 0) begin
      if (k == 1) e.sa = SA_REG5;
      if (k == 3) begin e.in0b = 1; e.btr[d3] = 1; end
    end else if (d1 == 3 && d2 == 4) begin
      if (k == 1) e.sa = SA_PC;
      if (k == 2) e.pcinc = 1;
      if (k == 3) begin e.rtb[7] = 1; e.btr[d3] = 1; end
    end else if (d1 == 3 && (d2 == 5 || d2 == 6)) begin
      if (taken) begin
        if (k == 1) e.sa = SA_PC;
        if (k == 3) begin e.rtb[7] = 1; e.btr[6] = 1; end
      end else if (k == 1) e.pcinc = 1;
    end else if (d1 == 3 && d2 == 7 && i != 8'o377) begin
      if (k == 1) begin e.shl = i[0]; e.shr = !i[0]; end
    end
    return e;
  endfunction

  function automatic logic skips(logic [7:0] i, logic c, logic n, logic z);
    int d1 = i >> 6, d2 = (i >> 3) & 7, d3 = i & 7;
    if (d1 == 0) return 1;
    if (d1 == 1) return 0;
    if (d1 == 2) return d2 < 4;
    if (d2 == 0 || d2 == 4) return 0;
    if (d2 == 5) return !(|(3'(d3) & {c, n, z}));
    if (d2 == 6) return !(|(3'(d3) & ~{c, n, z}));
    return 1;
  endfunction

  int skipped = 0, taken_jumps = 0;

  initial begin
    exp_t e;
    int seq [$];
    step = 0; to_manual = 0; {flag_c, flag_n, flag_z} = 0; ir_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(state == ST8, "reset to state 8");
    for (int i = 0; i < 256; i++) begin
      for (int f = 0; f < ((i >> 6 == 3 && ((i >> 3 & 7) == 5 || (i >> 3 & 7) == 6)) ? 8 : 1); f++) begin
        ir_in = 8'(i); {flag_c, flag_n, flag_z} = 3'(f);
        @(negedge clk);
        check(ir == 8'(i), "instruction loaded");
        seq.delete();
        for (int k = 1; k <= 8; k++)
          if (!(skips(8'(i), flag_c, flag_n, flag_z) && k >= 2 && k <= 4)) seq.push_back(k);
        if (skips(8'(i), flag_c, flag_n, flag_z)) skipped++;
        else if (i >> 6 == 3 && ((i >> 3 & 7) == 5 || (i >> 3 & 7) == 6)) taken_jumps++;
        foreach (seq[j]) begin
          int k;
          k = seq[j];
          step = 1; @(negedge clk); step = 0;
          e = expect_of(k, 8'(i), flag_c, flag_n, flag_z);
          // a skipped instruction shows state 4 after state 1
          check(state == ((k == 1 && skips(8'(i), flag_c, flag_n, flag_z)) ? ST4 : 8'(1 << (8 - k))),
                $sformatf("state after step to %0d, instr %o", k, i));
          check(gates.reg_to_bus == e.rtb && gates.bus_to_reg == e.btr &&
                gates.in0_to_bus == e.in0b && gates.bus_to_alu == e.balu &&
                gates.alu_to_acc == e.atoa && gates.sa_src == e.sa && gates.ir_src == e.irs,
                $sformatf("gates in state %0d of %o", k, i));
          check(pulses.pc_inc == e.pcinc && pulses.reg_op == e.rop &&
                (!e.rop || (pulses.op_mask == e.mask && pulses.op_fn == reg_op_e'(i >> 3))) &&
                pulses.shift_l == e.shl && pulses.shift_r == e.shr &&
                pulses.alu_fn_load == e.fnl && (!e.fnl || pulses.alu_fn == alu_fn_e'(i >> 3)),
                $sformatf("actions in state %0d of %o", k, i));
          @(negedge clk);
          check(pulses == PULSES_NONE, "actions last one cycle");
        end
      end
    end
    // return to manual from the middle of an instruction
    ir_in = 8'o100; @(negedge clk);
    step = 1; @(negedge clk); step = 0; @(negedge clk);
    check(state == ST1, "state 1");
    to_manual = 1; @(negedge clk); to_manual = 0;
    check(state == ST8 && gates == GATES_CLOSED, "to manual");
    check(skipped > 100 && taken_jumps > 20, "coverage of skips and taken jumps");
    $display("skipped=%0d taken jumps=%0d", skipped, taken_jumps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
