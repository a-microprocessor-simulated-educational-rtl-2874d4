// Memory chip-select decoding of the computer board.
//
// The 8008's high address byte carries a 6-bit page number (bits 1-6 of the
// byte here numbered from 1 at the LSB) and, in its top two bits, the cycle
// type. Only four pages of PROM (000-003), one page of RAM (013, kept from
// the development system) and the display shift register (any page ending in
// 77) are used. A 3-to-8 decoder takes page bits 1, 2 and 4 as its select
// inputs and is enabled by bit 3 being 0, so pages 000-003 select outputs
// 0-3 and page 013 selects output 7; a page ending in 77 has bit 3 set, which
// disables the decoder, and selects the shift register instead.
// Interface: page = high address bits 1-6; cs_n is the decoder's active-low
// outputs (0-3 to the PROMs, 7 to the RAM); sr_sel is high for X77.
// Purely combinational.
module cb_mem_decode (
  input  logic [5:0] page,
  output logic [7:0] cs_n,
  output logic       sr_sel
);

  logic [2:0] sel;
  assign sel    = {page[3], page[1], page[0]};
  assign sr_sel = (page == 6'o77);

  always_comb begin
    cs_n = '1;
    if (!page[2]) cs_n[sel] = 1'b0;
  end

endmodule
