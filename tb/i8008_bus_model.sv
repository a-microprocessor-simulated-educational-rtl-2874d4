// Bus-cycle model of the 8008 microprocessor for the testbenches (not a
// processor: it carries out the machine cycles it is told to).
// Each state lasts two periods of the two-phase clock. The state code on
// S2S1S0 changes at the start of phi1; sync rises at the first phi2 of the
// state and falls at the second, so phi2 with sync low (phi22) is the
// second phi2. A cycle is T1 (low address out), T2 (cycle type and high
// address out), WAIT states for as long as READY was low at the end of the
// previous state, and T3 (data in, sampled at the end of its first phi1, or
// data out). The interrupt line is noted at the start of each cycle.
// Tasks: cycle(type, address, write data, read data); type 0 memory read,
// 2 input, 3 write (the 8008's top two bits of the high address).
module i8008_bus_model (
  input  logic       phi1,
  input  logic       phi2,
  output logic       sync,
  output logic [2:0] s,
  output logic [7:0] cpu_dout,
  output logic       cpu_drive,
  input  logic [7:0] cpu_din,
  input  logic       ready,
  input  logic       intr
);
  localparam logic [2:0] S_T1 = 3'b010, S_T2 = 3'b100, S_T3 = 3'b001,
                         S_WAIT = 3'b000, S_STOP = 3'b011;
  int waits = 0, cycles = 0, intr_seen = 0;

  initial begin sync = 0; s = S_STOP; cpu_dout = 0; cpu_drive = 0; end

  // first half of a state: phi1 (data sampling point in T3), phi2 (sync up)
  task automatic first_half(logic [2:0] sv, output logic [7:0] sampled);
    @(posedge phi1); s = sv;
    @(negedge phi1); sampled = cpu_din;
    @(posedge phi2); sync = 1;
  endtask
  // second half: phi1, then phi2 with sync low; READY is the value it had
  // at the end of that phi2 (sampled while phi2 is still high)
  task automatic second_half(output logic rdy);
    @(posedge phi1);
    @(posedge phi2); sync = 0;
    rdy = 0;
    while (phi2) begin rdy = ready; #1; end
  endtask

  task automatic idle_state();
    logic [7:0] d; logic r;
    first_half(S_STOP, d); second_half(r);
  endtask

  task automatic cycle(input logic [1:0] typ, input logic [13:0] addr,
                       input logic [7:0] wdata, output logic [7:0] rdata);
    logic [7:0] d; logic r;
    if (intr) intr_seen++;
    cpu_drive = 1; cpu_dout = addr[7:0];
    first_half(S_T1, d); second_half(r);
    cpu_dout = {typ, addr[13:8]};
    first_half(S_T2, d); second_half(r);
    while (!r) begin
      waits++;
      cpu_drive = 0;
      first_half(S_WAIT, d); second_half(r);
    end
    cpu_drive = (typ == 2'b11);
    cpu_dout  = wdata;
    first_half(S_T3, rdata); second_half(r);
    cpu_drive = 0;
    cycles++;
  endtask
endmodule
