// Front-panel push-button servicing of the educational computer.
//
// In manual operation every gate of the machine is opened by holding its
// push-button, and register operations are applied by holding a function
// button (clear, complement, increment, decrement) with one or more register
// selector buttons. The rules the block enforces:
//  - a button only counts once two successive samples agree (debouncing);
//  - mutually exclusive buttons: the four functions; the nine bus sources
//    (registers 0-6, store, input 0); the four ALU functions; the three
//    store-address sources; the two instruction sources; and the group
//    {bus to accumulator, ALU result to accumulator, shift left, shift right}.
//    If two of a group are held the panel does nothing at all and the lamps
//    of the held gate buttons flash (the document flashes only those of the
//    offending group; here any other held gate flashes with them). Several
//    function buttons are simply ignored, as they have no lamps;
//  - register operations, shifts and the ALU-to-accumulator transfer happen
//    once per press, however long the button is held;
//  - an ALU function button is remembered by the ALU after release.
// Interface: raw buttons in (1 = pressed); gates are levels, pulses last one
// cycle; lamps is the gate set to display (pressed buttons, flashing at
// 2**FLASH_LOG2 cycles per half period while alarm is set; the default is
// about 0.1 s at the 10 MHz system clock). Nothing acts
// while active is low (the machine is running).
// Timing: one clock of sampling plus one of agreement before a button acts.
// pulses.pc_inc is always 0 here: by hand the program counter is stepped
// like any other register, through the increment button.
module edu_panel
  import edu_pkg::*;
#(
  parameter int unsigned FLASH_LOG2 = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        active,
  input  logic [3:0]  fn_btn,       // [0] clear, [1] complement, [2] increment, [3] decrement
  input  logic [6:0]  regsel_btn,   // registers 0-6
  input  logic [7:0]  rtb_btn,      // register (7 = store) to bus
  input  logic        in0_bus_btn,  // input 0 to bus
  input  logic [7:0]  btr_btn,      // bus to register (7 = store)
  input  logic [3:0]  alufn_btn,    // [0] add, [1] subtract, [2] AND, [3] OR
  input  logic        alu_in_btn,   // accumulator and bus to ALU
  input  logic        ltoa_btn,     // ALU result to accumulator
  input  logic        shl_btn,
  input  logic        shr_btn,
  input  logic [2:0]  sa_btn,       // [0] input 0, [1] register 5, [2] PC to store address
  input  logic [1:0]  ir_btn,       // [0] store, [1] input 0 to instruction register
  output gates_t      gates,
  output pulses_t     pulses,
  output gates_t      lamps,
  output logic        alarm
);

  localparam int unsigned NB = 4 + 7 + 8 + 1 + 8 + 4 + 1 + 3 + 3 + 2;

  logic [NB-1:0] raw, s1, s2, btn;
  assign raw = {fn_btn, regsel_btn, rtb_btn, in0_bus_btn, btr_btn, alufn_btn,
                alu_in_btn, ltoa_btn, shl_btn, shr_btn, sa_btn, ir_btn};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0; s2 <= '0; btn <= '0;
    end else begin
      s1 <= raw;
      s2 <= s1;
      for (int i = 0; i < NB; i++) if (s1[i] == s2[i]) btn[i] <= s1[i];
    end
  end

  logic [3:0] b_fn;   logic [6:0] b_sel;  logic [7:0] b_rtb;  logic b_in0;
  logic [7:0] b_btr;  logic [3:0] b_alu;  logic b_alu_in, b_ltoa, b_shl, b_shr;
  logic [2:0] b_sa;   logic [1:0] b_ir;
  assign {b_fn, b_sel, b_rtb, b_in0, b_btr, b_alu, b_alu_in, b_ltoa, b_shl,
          b_shr, b_sa, b_ir} = btn;

  function automatic logic many(logic [8:0] v);
    return $countones(v) > 1;
  endfunction

  logic bad_rtb, bad_acc, bad_alu, bad_sa, bad_ir, fn_ok;
  assign bad_rtb = many({b_in0, b_rtb});
  assign bad_acc = many({5'b0, b_btr[0], b_ltoa, b_shl, b_shr});
  assign bad_alu = many({5'b0, b_alu});
  assign bad_sa  = many({6'b0, b_sa});
  assign bad_ir  = many({7'b0, b_ir});
  assign fn_ok   = ($countones(b_fn) == 1);
  assign alarm   = active && (bad_rtb || bad_acc || bad_alu || bad_sa || bad_ir);

  logic ok;
  assign ok = active && !alarm;

  // once-per-press actions
  logic [6:0] op_cond, op_prev;
  logic       shl_prev, shr_prev, ltoa_prev;
  assign op_cond = (ok && fn_ok) ? b_sel : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_prev <= '0; shl_prev <= 1'b0; shr_prev <= 1'b0; ltoa_prev <= 1'b0;
    end else begin
      op_prev   <= op_cond;
      shl_prev  <= ok && b_shl;
      shr_prev  <= ok && b_shr;
      ltoa_prev <= ok && b_ltoa;
    end
  end

  logic [1:0] fn_idx, alu_idx;
  always_comb begin
    fn_idx = 2'd0; alu_idx = 2'd0;
    for (int i = 0; i < 4; i++) begin
      if (b_fn[i])  fn_idx  = 2'(i);
      if (b_alu[i]) alu_idx = 2'(i);
    end
  end

  always_comb begin
    gates  = GATES_CLOSED;
    pulses = PULSES_NONE;
    if (ok) begin
      gates.reg_to_bus = b_rtb;
      gates.in0_to_bus = b_in0;
      gates.bus_to_reg = b_btr;
      gates.bus_to_alu = b_alu_in;
      gates.alu_to_acc = b_ltoa && !ltoa_prev;
      gates.sa_src     = b_sa[0] ? SA_IN0 : b_sa[1] ? SA_REG5 : b_sa[2] ? SA_PC : SA_NONE;
      gates.ir_src     = b_ir[0] ? IR_STORE : b_ir[1] ? IR_IN0 : IR_NONE;
      pulses.op_mask     = op_cond & ~op_prev;
      pulses.reg_op      = |pulses.op_mask;
      pulses.op_fn       = reg_op_e'(fn_idx);
      pulses.shift_l     = b_shl && !shl_prev;
      pulses.shift_r     = b_shr && !shr_prev;
      pulses.alu_fn_load = |b_alu;
      pulses.alu_fn      = alu_fn_e'(alu_idx);
    end
  end

  // lamps: pressed gate buttons, flashing during an alarm
  logic [FLASH_LOG2:0] flash_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) flash_cnt <= '0;
    else        flash_cnt <= flash_cnt + 1'b1;
  end

  always_comb begin
    lamps = GATES_CLOSED;
    if (active && (!alarm || flash_cnt[FLASH_LOG2])) begin
      lamps.reg_to_bus = b_rtb;
      lamps.in0_to_bus = b_in0;
      lamps.bus_to_reg = b_btr;
      lamps.bus_to_alu = b_alu_in;
      lamps.alu_to_acc = b_ltoa;
      lamps.sa_src     = b_sa[0] ? SA_IN0 : b_sa[1] ? SA_REG5 : b_sa[2] ? SA_PC : SA_NONE;
      lamps.ir_src     = b_ir[0] ? IR_STORE : b_ir[1] ? IR_IN0 : IR_NONE;
    end
  end

endmodule
