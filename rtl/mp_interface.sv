// Interface board between the computer board and the front panel.
//
// It holds the 32-word display shift register with its logic control unit
// (position counter, comparator, ready and write control, LED word lines)
// and the panel switch matrix. The computer board sees the shift register
// as memory page X77 and the switch matrix as its input port: the group of
// switches read is chosen by the low address (the accumulator contents sent
// out by an input instruction).
// Interface: addresses, output data, write strobe, phi2 and sync from the
// computer board; memory data (with its enable), input-port data and ready
// back to it; switch states in; LED bit and word lines out (1 = lit).
// Only the page bits of the high address and the bits of the low address
// that reach the comparator and the switch decoder are used.
module mp_interface #(
  parameter logic [31:0] DISPLAY_MASK = 32'hFFD5_9555,
  parameter int unsigned BLANK        = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [7:0]       hi_addr,
  input  logic [7:0]       lo_addr,
  input  logic [7:0]       odata,
  input  logic             wr,
  input  logic             phi2,
  input  logic             sync,
  output logic [7:0]       mem_data,
  output logic             mem_oe,
  output logic [7:0]       in_data,
  output logic             ready,
  input  logic [15:0][7:0] sw,
  output logic [7:0]       bit_lines,
  output logic [31:0]      word_lines,
  output logic [4:0]       position
);

  logic       sr_sel, sr_shift, sr_write, sr_gate;
  logic [7:0] q;

  assign sr_sel = (hi_addr[5:0] == 6'o77);

  if_logic #(.DISPLAY_MASK(DISPLAY_MASK), .BLANK(BLANK)) u_logic (
    .clk, .rst_n, .sr_sel, .lo(lo_addr[4:0]), .wr, .phi2, .sync,
    .sr_shift, .sr_write, .sr_gate, .ready, .position, .word_lines);

  if_shift_reg u_sr (.clk, .shift(sr_shift), .write(sr_write), .din(odata), .q);

  if_switch_matrix u_sw (.sw, .code(lo_addr[3:0]), .data(in_data));

  assign bit_lines = sr_gate ? q : 8'h00;
  assign mem_oe    = sr_sel;
  assign mem_data  = sr_gate ? q : 8'h00;

endmodule
