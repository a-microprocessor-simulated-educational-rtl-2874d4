// Top level: the educational computer and the microprocessor system that
// presents it on the original prototype, side by side.
//
// edu_machine is the educational computer itself - registers, store, ALU,
// instruction decoder, eight-state microprogram, panel servicing and modes -
// built directly as logic. The original prototype produced the same machine
// in software on an 8008 microprocessor; mp_board and mp_interface are that
// prototype's hardware: the computer board (clocks, state decoding, bus
// latches and ports, page decoding, RAM) and the interface board (display
// shift register, LED scanning, switch matrix). The 8008 and its program
// PROMs are not part of this design, so their pins are ports of the top.
// The two halves share the system clock and reset and nothing else: each
// has its own panel inputs and display outputs.
module edu_top
  import edu_pkg::*;
#(
  parameter int unsigned DELAY_BASE = 20_000_000,
  parameter int unsigned FLASH_LOG2 = 20,
  parameter int unsigned AW         = 8,
  parameter int unsigned CLK_CYCLE  = 20,
  parameter int unsigned STEP_W     = 50
) (
  input  logic             clk,
  input  logic             rst_n,
  // ---- educational computer: front panel
  input  logic [7:0]       in0,
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
  output logic [6:0][7:0]  regs,
  output logic [7:0]       bus,
  output logic [AW-1:0]    sar,
  output logic [7:0]       ir,
  output decoded_t         dec,
  output alu_fn_e          alu_fn,
  output logic [7:0]       alu_result,
  output logic [2:0]       flags,
  output logic [7:0]       state,
  output gates_t           gate_lamps,
  output logic             alarm,
  output logic             running,
  // ---- microprocessor system: 8008 pins
  output logic             phi1,
  output logic             phi2,
  input  logic             sync,
  input  logic [2:0]       s,
  input  logic [7:0]       cpu_dout,
  input  logic             cpu_drive,
  output logic [7:0]       cpu_din,
  output logic             ready,
  output logic             intr,
  input  logic             run,
  input  logic             step_btn,
  input  logic             int_btn,
  input  logic             auto_start,
  // PROM sockets
  output logic [7:0]       rom_addr,
  output logic [3:0]       rom_cs_n,
  input  logic [7:0]       rom_data,
  // panel switch matrix and LED matrix of the interface
  input  logic [15:0][7:0] sw,
  output logic [7:0]       bit_lines,
  output logic [31:0]      word_lines,
  output logic [4:0]       scan_pos,     // location now at the display output
  output logic             t3a,
  output logic             wait_n,
  output logic             stop_n
);

  edu_machine #(.DELAY_BASE(DELAY_BASE), .FLASH_LOG2(FLASH_LOG2), .AW(AW)) u_machine (
    .clk, .rst_n, .in0, .fn_btn, .regsel_btn, .rtb_btn, .in0_bus_btn, .btr_btn,
    .alufn_btn, .alu_in_btn, .ltoa_btn, .shl_btn, .shr_btn, .sa_btn, .ir_btn,
    .mode, .speed, .start_btn, .stop_btn,
    .regs, .bus, .sar, .ir, .dec, .alu_fn, .alu_result, .flags, .state,
    .gate_lamps, .alarm, .running);

  logic [7:0] hi_addr, lo_addr, odata, if_mem_data, if_in_data;
  logic       wr, if_mem_oe, if_ready;

  mp_board #(.CLK_CYCLE(CLK_CYCLE), .STEP_W(STEP_W)) u_board (
    .clk, .rst_n, .phi1, .phi2, .sync, .s, .cpu_dout, .cpu_drive, .cpu_din,
    .ready, .intr, .run, .step_btn, .int_btn, .auto_start,
    .rom_addr, .rom_cs_n, .rom_data,
    .hi_addr, .lo_addr, .odata, .wr, .if_mem_data, .if_mem_oe, .if_in_data,
    .if_ready, .t3a, .wait_n, .stop_n);

  mp_interface u_if (
    .clk, .rst_n, .hi_addr, .lo_addr, .odata, .wr, .phi2, .sync,
    .mem_data(if_mem_data), .mem_oe(if_mem_oe), .in_data(if_in_data),
    .ready(if_ready), .sw, .bit_lines, .word_lines, .position(scan_pos));

endmodule
