// 8-bit input/output port with latch and gated output (Intel 8212 type).
//
// The part is an 8-bit latch followed by an output gate, used on the
// computer board five times: as the input port and the memory port feeding
// the microprocessor, as a plain buffer on its output data, and as the two
// address latches. Its behaviour follows the control truth table:
//   output enabled   when MD = 1, or when DS1_n = 0 and DS2 = 1;
//   latch written    when MD = 0 and STB = 1, or when MD = 1, DS1_n = 0 and
//                    DS2 = 1.
// The clear input is not used on the board and is left out.
// Here the latch is sampled on the system clock: while the write condition
// holds the latch takes din at every rising edge (a transparent latch seen
// through the clock), and it holds the last value afterwards. The gated
// output is given as data plus an enable (oe), since the bus it drives is
// resolved by the block that owns it; dout is zero while disabled.
module i8212 (
  input  logic       clk,
  input  logic       md,
  input  logic       ds1_n,
  input  logic       ds2,
  input  logic       stb,
  input  logic [7:0] din,
  output logic [7:0] dout,
  output logic       oe
);

  logic       sel;
  logic [7:0] q;

  assign sel = !ds1_n && ds2;
  assign oe  = md || sel;

  always_ff @(posedge clk) begin
    if ((!md && stb) || (md && sel)) q <= din;
  end

  assign dout = oe ? q : '0;

endmodule
