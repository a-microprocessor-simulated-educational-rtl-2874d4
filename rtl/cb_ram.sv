// Read/write memory of the computer board: one page of 256 8-bit words.
//
// Two 256-word by 4-bit static RAMs (8101 type) side by side, one holding
// the low four bits and one the high four, make up the one page of RAM the
// microprogram needs. They are addressed by the low-address latch, take
// data from the buffered output data bus and put data on the memory data
// bus through their own output gates.
// Interface: cs (chip select from the page decoder), wr (the board's
// write/read line, high to write), addr, din; dout with oe (driving the
// memory data bus while selected and not writing).
// Timing: writes at each rising system clock edge while cs and wr are high
// (a static RAM written for the length of the write pulse); reads are
// combinational. Contents are cleared at time zero for simulation only.
module cb_ram #(
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          cs,
  input  logic          wr,
  input  logic [AW-1:0] addr,
  input  logic [7:0]    din,
  output logic [7:0]    dout,
  output logic          oe
);

  logic [3:0] lo_half [2**AW];
  logic [3:0] hi_half [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) begin
      lo_half[i] = '0;
      hi_half[i] = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (cs && wr) begin
      lo_half[addr] <= din[3:0];
      hi_half[addr] <= din[7:4];
    end
  end

  assign oe   = cs && !wr;
  assign dout = oe ? {hi_half[addr], lo_half[addr]} : '0;

endmodule
