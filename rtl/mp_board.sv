// Computer board: the glue, ports and memory around an 8008 microprocessor.
//
// The 8008 has one bidirectional 8-bit bus that carries, in turn, the low
// address (state T1), the high address with the cycle type in its top two
// bits (T2) and the data (T3). Five 8212 latches separate these: a buffer
// copies the bus to the output data bus; two address latches, strobed by
// phi22 in T1 and T2, hold the low and high address; and a memory port and
// an input port drive the processor's bus in the bridging state T3A of a
// memory-read or input cycle. The page decoder selects one of four PROM
// sockets, the RAM page or (page X77) the display shift register on the
// interface board. The control block makes the clocks, state decoding,
// bridging state, write strobe, ready and interrupt.
// The 8008 itself and the PROMs holding its program are outside this block:
// their pins are ports (cpu_*, rom_*). cpu_drive tells when the processor
// drives its bus (address states and the data state of a write cycle).
// Interface to the display board: addresses, output data, write strobe,
// sync and phi2 out; memory data, input-port data and ready in.
// Unused nets, kept to match the board: the T1/T2/T3 decoder outputs only
// strobe latches inside cb_control; the enable outputs of the always-on
// latches and of the RAM are not needed because the memory bus is an OR of
// gated sources; page decoder outputs 4-6 go to empty positions.
module mp_board #(
  parameter int unsigned CLK_CYCLE = 20,
  parameter int unsigned STEP_W    = 50
) (
  input  logic       clk,
  input  logic       rst_n,
  // 8008 pins
  output logic       phi1,
  output logic       phi2,
  input  logic       sync,
  input  logic [2:0] s,
  input  logic [7:0] cpu_dout,
  input  logic       cpu_drive,
  output logic [7:0] cpu_din,
  output logic       ready,
  output logic       intr,
  // board switches
  input  logic       run,
  input  logic       step_btn,
  input  logic       int_btn,
  input  logic       auto_start,
  // PROM sockets
  output logic [7:0] rom_addr,
  output logic [3:0] rom_cs_n,
  input  logic [7:0] rom_data,
  // to and from the interface board
  output logic [7:0] hi_addr,
  output logic [7:0] lo_addr,
  output logic [7:0] odata,
  output logic       wr,
  input  logic [7:0] if_mem_data,
  input  logic       if_mem_oe,
  input  logic [7:0] if_in_data,
  input  logic       if_ready,
  // state lamps and monitoring
  output logic       t3a,
  output logic       wait_n,
  output logic       stop_n
);

  logic [7:0] cpu_bus, mem_bus, ram_dout, memp_dout, inp_dout;
  logic       t1_n, t2_n, t3_n, lo_ds1_n, hi_ds1_n, latch_ds2, mem_ds1_n, in_ds1_n;
  logic       ram_oe, memp_oe, inp_oe, unused_oe, hi_oe, lo_oe;
  logic [7:0] cs_n;
  logic       sr_sel_unused;

  assign cpu_bus = cpu_drive ? cpu_dout : cpu_din;

  cb_clockgen #(.CYCLE(CLK_CYCLE), .PHI1_W(CLK_CYCLE * 7 / 20),
                .GAP12(CLK_CYCLE / 10), .PHI2_W(CLK_CYCLE * 7 / 20))
    u_clk (.clk, .rst_n, .phi1, .phi2);

  cb_control #(.STEP_W(STEP_W)) u_ctl (
    .clk, .rst_n, .phi2, .sync, .s, .do7(hi_addr[6]), .do8(hi_addr[7]),
    .run, .step_btn, .int_btn, .auto_start, .if_ready,
    .t1_n, .t2_n, .t3_n, .wait_n, .stop_n,
    .lo_latch_ds1_n(lo_ds1_n), .hi_latch_ds1_n(hi_ds1_n), .latch_ds2,
    .t3a, .mem_ds1_n, .in_ds1_n, .wr, .ready, .intr);

  // data buffer (unit 3), address latches (units 4 and 5)
  i8212 u_buf (.clk, .md(1'b1), .ds1_n(1'b0), .ds2(1'b1), .stb(1'b0),
               .din(cpu_bus), .dout(odata), .oe(unused_oe));
  i8212 u_hi  (.clk, .md(1'b1), .ds1_n(hi_ds1_n), .ds2(latch_ds2), .stb(1'b0),
               .din(cpu_bus), .dout(hi_addr), .oe(hi_oe));
  i8212 u_lo  (.clk, .md(1'b1), .ds1_n(lo_ds1_n), .ds2(latch_ds2), .stb(1'b0),
               .din(cpu_bus), .dout(lo_addr), .oe(lo_oe));

  // memory port (unit 2) and input port (unit 1)
  i8212 u_memp (.clk, .md(1'b0), .ds1_n(mem_ds1_n), .ds2(t3a), .stb(1'b1),
                .din(mem_bus), .dout(memp_dout), .oe(memp_oe));
  i8212 u_inp  (.clk, .md(1'b0), .ds1_n(in_ds1_n), .ds2(t3a), .stb(1'b1),
                .din(if_in_data), .dout(inp_dout), .oe(inp_oe));

  assign cpu_din = memp_dout | inp_dout;

  cb_mem_decode u_dec (.page(hi_addr[5:0]), .cs_n, .sr_sel(sr_sel_unused));

  cb_ram u_ram (.clk, .cs(!cs_n[7]), .wr, .addr(lo_addr), .din(odata),
                .dout(ram_dout), .oe(ram_oe));

  assign rom_addr = lo_addr;
  assign rom_cs_n = cs_n[3:0];
  assign mem_bus  = (&rom_cs_n ? 8'h00 : rom_data) | ram_dout |
                    (if_mem_oe ? if_mem_data : 8'h00);

  // Two ports never drive the processor's bus together.
  a_one_port: assert property (@(posedge clk) disable iff (!rst_n) !(memp_oe && inp_oe));

endmodule
