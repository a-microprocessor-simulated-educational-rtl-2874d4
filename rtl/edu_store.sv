// Store of the educational computer and its store address register.
//
// The store holds 2**AW words of 8 bits (256 in the machine as described:
// an 8-bit addressing register reaches 256 words). It is addressed by the
// store address register, which takes a new value through one of three
// gates - from the input 0 toggle switches (manual use), from register 5 or
// from the program counter - and keeps it until the next gate opens. A real
// memory would not need that register; the machine has it so that the
// address can be set up and inspected by hand.
//
// Interface: sa_src chooses the gate (SA_NONE keeps the address). we writes
// din at the current address. dout is the word at the current address,
// read combinationally (the store is a source on the data bus).
// While an address gate is open the store is addressed straight from its
// source, so a write made in the same cycle as the gate opens (two panel
// buttons pressed together) goes to the new address, not the old one.
// Timing: address register and write at the rising clock edge. The store contents are
// cleared at time zero for simulation (a two-state simulator
// otherwise starts memory at random values); no reset clears them.
module edu_store
  import edu_pkg::*;
#(
  parameter int unsigned AW = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  sa_src_e        sa_src,
  input  logic [W-1:0]   in0,
  input  logic [W-1:0]   reg5,
  input  logic [W-1:0]   pc,
  input  logic           we,
  input  logic [W-1:0]   din,
  output logic [AW-1:0]  sar,
  output logic [W-1:0]   dout
);

  logic [W-1:0] mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  end

  logic [AW-1:0] addr;

  always_comb begin
    unique case (sa_src)
      SA_IN0:  addr = in0[AW-1:0];
      SA_REG5: addr = reg5[AW-1:0];
      SA_PC:   addr = pc[AW-1:0];
      default: addr = sar;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sar <= '0;
    else        sar <= addr;
  end

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= din;
  end

  assign dout = mem[addr];

endmodule
