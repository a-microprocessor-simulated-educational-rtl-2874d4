// The educational computer: an 8-bit machine built around one data bus.
//
// Sources on the bus are registers 0-6, the store (register 7) and the
// input 0 toggle switches; at most one gate drives it, and with none open
// the bus reads all ones. Destinations are registers 0-6, the store, and the
// ALU, which combines the bus with the accumulator and whose result goes
// back to the accumulator through its own gate. The store is addressed by
// the store address register; the instruction register takes the word at
// that address (or input 0 by hand) and its decoder steers the microprogram.
// While the machine is in manual operation the panel buttons open the
// gates; while it runs, the eight-state microprogram does.
// Interface: panel buttons, the mode selector, speed selector and start and
// stop buttons in; everything the front panel displays out.
// Timing: single clock; see edu_mode for the rate of steps.
module edu_machine
  import edu_pkg::*;
#(
  parameter int unsigned DELAY_BASE = 20_000_000,
  parameter int unsigned FLASH_LOG2 = 20,
  parameter int unsigned AW         = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // panel
  input  logic [W-1:0]     in0,          // input 0 toggle switches
  input  logic [3:0]       fn_btn,
  input  logic [6:0]       regsel_btn,
  input  logic [7:0]       rtb_btn,
  input  logic             in0_bus_btn,
  input  logic [7:0]       btr_btn,
  input  logic [3:0]       alufn_btn,
  input  logic             alu_in_btn,
  input  logic             ltoa_btn,
  input  logic             shl_btn,
  input  logic             shr_btn,
  input  logic [2:0]       sa_btn,
  input  logic [1:0]       ir_btn,
  input  mode_e            mode,
  input  logic [2:0]       speed,
  input  logic             start_btn,
  input  logic             stop_btn,
  // display
  output logic [6:0][W-1:0] regs,
  output logic [W-1:0]     bus,
  output logic [AW-1:0]    sar,
  output logic [W-1:0]     ir,
  output decoded_t         dec,
  output alu_fn_e          alu_fn,
  output logic [W-1:0]     alu_result,
  output logic [2:0]       flags,        // carry, negative, zero
  output logic [7:0]       state,
  output gates_t           gate_lamps,
  output logic             alarm,
  output logic             running
);

  gates_t  g_mp, g_pn, g, g_pn_lamps;
  pulses_t p_mp, p_pn, p;
  logic    step, to_manual;
  logic [W-1:0] store_dout, shift_dout;
  logic    flag_c, flag_n, flag_z;

  assign g = running ? g_mp : g_pn;
  assign p = running ? p_mp : p_pn;
  assign gate_lamps = running ? g_mp : g_pn_lamps;
  assign flags = {flag_c, flag_n, flag_z};

  // data bus
  always_comb begin
    bus = '1;
    for (int r = 0; r < 7; r++) if (g.reg_to_bus[r]) bus = regs[r];
    if (g.reg_to_bus[R_STORE]) bus = store_dout;
    if (g.in0_to_bus)          bus = in0;
  end

  edu_panel #(.FLASH_LOG2(FLASH_LOG2)) u_panel (
    .clk, .rst_n, .active(!running),
    .fn_btn, .regsel_btn, .rtb_btn, .in0_bus_btn, .btr_btn, .alufn_btn,
    .alu_in_btn, .ltoa_btn, .shl_btn, .shr_btn, .sa_btn, .ir_btn,
    .gates(g_pn), .pulses(p_pn), .lamps(g_pn_lamps), .alarm);

  edu_mode #(.DELAY_BASE(DELAY_BASE)) u_mode (
    .clk, .rst_n, .mode, .speed, .start_btn, .stop_btn,
    .end_of_instr(state == ST8), .halt(dec.ind_a[IA_HALT]),
    .step, .running, .to_manual);

  edu_control u_ctl (
    .clk, .rst_n, .step, .to_manual, .ir, .dec, .flag_c, .flag_n, .flag_z,
    .state, .gates(g_mp), .pulses(p_mp));

  edu_regfile u_regs (
    .clk, .rst_n, .bus, .bus_to_reg(g.bus_to_reg[6:0]),
    .reg_op(p.reg_op), .op_fn(p.op_fn), .op_mask(p.op_mask),
    .acc_load(g.alu_to_acc || p.shift_l || p.shift_r),
    .acc_din(g.alu_to_acc ? alu_result : shift_dout),
    .pc_inc(p.pc_inc), .regs);

  edu_alu u_alu (
    .clk, .rst_n, .fn_load(p.alu_fn_load), .fn_in(p.alu_fn),
    .compute(g.bus_to_alu), .acc(regs[R_ACC]), .bus,
    .shift_l(p.shift_l), .shift_r(p.shift_r),
    .fn(alu_fn), .result(alu_result), .flag_c, .flag_n, .flag_z, .shift_dout);

  edu_store #(.AW(AW)) u_store (
    .clk, .rst_n, .sa_src(g.sa_src), .in0, .reg5(regs[R_SA]), .pc(regs[R_PC]),
    .we(g.bus_to_reg[R_STORE]), .din(bus), .sar, .dout(store_dout));

  edu_decoder u_dec (
    .clk, .rst_n, .ir_src(g.ir_src), .store_dout, .in0, .ir, .dec);

endmodule
