// Panel switch matrix of the interface.
//
// The panel's push-buttons and toggle switches sit at the crossings of 16
// word lines and 8 bit lines. Before an input instruction the processor
// puts a group code in its accumulator; it appears in the low address byte,
// whose four low bits drive a 4-to-16 decoder that pulls one word line to
// ground. A pressed button on that line grounds its bit line; the bit lines
// are inverted into the processor's input port, so a pressed button reads
// as 1. The group codes (octal) are: 000 register functions, 001 register
// selectors, 002 mode, 003 speed, 004 bus-to-register gates, 005
// accumulator and bus to ALU, 006 ALU functions, 007 register-to-bus gates,
// 010 input 0 to bus, 011 store address sources, 012 instruction sources,
// 013 start and stop, 014 ALU result to accumulator and shifts, 017 the
// input 0 toggle switches. Codes 015 and 016 have no switches and read 0.
// Interface: sw[g] is the state of the eight switches of group g (1 =
// pressed or on); code is the low address; data goes to the input port.
// Purely combinational.
module if_switch_matrix (
  input  logic [15:0][7:0] sw,
  input  logic [3:0]       code,
  output logic [7:0]       data
);

  logic [15:0] word_line;     // decoder output, 1 = line pulled to ground

  always_comb begin
    word_line       = '0;
    word_line[code] = 1'b1;
    data            = '0;
    for (int g = 0; g < 16; g++)
      if (word_line[g] && g != 13 && g != 14) data |= sw[g];
  end

endmodule
