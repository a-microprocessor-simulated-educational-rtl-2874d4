// Self-checking test of cb_control. The testbench plays the 8008's side:
// it produces phi2, sync and the state code S2S1S0 for whole machine cycles
// (T1, T2, optional WAIT states, T3) of each type - memory read, input and
// write - and checks the state decoding, the bridging state T3A, the write
// strobe, the port selects, the ready line in run and step modes and the
// interrupt synchroniser, including the one interrupt after reset.
module tb_cb_control;
  localparam logic [2:0] S_T1 = 3'b010, S_T2 = 3'b100, S_T3 = 3'b001,
                         S_WAIT = 3'b000, S_STOP = 3'b011;
  localparam int STEP_W = 50;
  logic clk = 0, rst_n = 0;
  logic phi2, sync, do7, do8, run, step_btn, int_btn, auto_start, if_ready;
  logic [2:0] s;
  logic t1_n, t2_n, t3_n, wait_n, stop_n, lo_latch_ds1_n, hi_latch_ds1_n, latch_ds2;
  logic t3a, mem_ds1_n, in_ds1_n, wr, ready, intr;
  int checks = 0, failures = 0;
  int n_t3a = 0, n_wr = 0, n_int = 0, ready_cycles;

  cb_control #(.STEP_W(STEP_W)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  // one processor clock period (20 system clocks): phi1 then phi2
  task automatic period(logic sy);
    sync = sy;
    for (int c = 0; c < 20; c++) begin
      phi2 = (c >= 9 && c < 16);
      @(negedge clk);
    end
    phi2 = 0;
  endtask

  // one state: sync high for the first period, low for the second
  bit in_t3_second_half;
  task automatic state(logic [2:0] sv);
    s = sv; #1;
    check(t1_n == (sv != S_T1) && t2_n == (sv != S_T2) && t3_n == (sv != S_T3) &&
          wait_n == (sv != S_WAIT) && stop_n == (sv != S_STOP), "state decode");
    period(1'b1);
    in_t3_second_half = (sv == S_T3);
    period(1'b0);
    in_t3_second_half = 0;
  endtask

  // a machine cycle; type: 0 memory read, 2 input, 3 write
  task automatic cycle(int typ, int waits);
    bit saw_wr;
    do7 = 0; do8 = 0;
    state(S_T1);
    check(!t3a && !wr, "quiet in T1");
    do7 = typ[0]; do8 = typ[1];
    state(S_T2);
    #1;
    check(mem_ds1_n == do8 && in_ds1_n == !(do8 && !do7), "port selects");
    check(t3a == (typ != 3), $sformatf("T3A after T2 (type %0d)", typ));
    for (int w = 0; w < waits; w++) begin
      state(S_WAIT);
      check(t3a == (typ != 3), "T3A held through WAIT");
    end
    s = S_T3; sync = 1;
    saw_wr = 0;
    for (int c = 0; c < 40; c++) begin
      phi2 = ((c % 20) >= 9 && (c % 20) < 16);
      sync = (c < 20);
      @(negedge clk);
      if (wr) saw_wr = 1;
      if (c >= 1 && c < 20) check(!t3a, "T3A cleared in first half of T3");
      if (c >= 30) check(!wr, "write strobe ended by phi22");
    end
    phi2 = 0;
    check(saw_wr == (typ == 3), "write strobe only in write cycles");
    if (saw_wr) n_wr++;
    if (typ != 3) n_t3a++;
  endtask

  always @(posedge clk) if (rst_n) check(!(wr && t3a), "write and T3A together");

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    phi2 = 0; sync = 0; s = S_STOP; do7 = 0; do8 = 0; run = 1; step_btn = 0;
    int_btn = 0; auto_start = 1; if_ready = 1;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (3) @(negedge clk);
    // auto start: one interrupt request after reset, given at a sync rise
    state(S_STOP);
    check(intr, "interrupt after reset with auto start");
    state(S_T1);
    state(S_T2); #1;
    check(!intr, "interrupt cleared in T2");
    state(S_T3);
    state(S_STOP); check(!intr, "only one automatic interrupt");
    // random machine cycles
    for (int i = 0; i < 60; i++) begin
      int typ;
      typ = $urandom_range(0, 3);
      if (typ == 1) typ = 0;
      cycle(typ, $urandom_range(0, 2));
    end
    // ready in run mode follows the interface
    for (int i = 0; i < 50; i++) begin
      @(negedge clk); if_ready = 1'($urandom); #1;
      check(ready == if_ready, "ready at run");
    end
    // wait mode: ready only during the step pulse
    run = 0; if_ready = 1; repeat (5) @(negedge clk);
    check(!ready, "no ready in wait mode");
    step_btn = 1; ready_cycles = 0;
    repeat (2 * STEP_W) begin @(negedge clk); if (ready) ready_cycles++; end
    step_btn = 0;
    check(ready_cycles == STEP_W, $sformatf("step pulse %0d cycles", ready_cycles));
    step_btn = 1; if_ready = 0; ready_cycles = 0;
    repeat (2 * STEP_W) begin @(negedge clk); if (ready) ready_cycles++; end
    step_btn = 0;
    check(ready_cycles == 0, "step pulse needs the interface ready");
    run = 1; if_ready = 1;
    // interrupt button: waits for the next sync rise, cleared in T2
    repeat (3) begin
      int_btn = 1; s = S_STOP; sync = 0;
      repeat (5) @(negedge clk); int_btn = 0;
      repeat (5) @(negedge clk);
      check(!intr, "interrupt waits for sync");
      sync = 1; repeat (2) @(negedge clk);
      check(intr, "interrupt at sync rise");
      if (intr) n_int++;
      state(S_T1); check(intr, "held in T1");
      state(S_T2); #1; check(!intr, "cleared in T2");
      state(S_T3);
    end
    check(n_t3a > 0 && n_wr > 0 && n_int == 3, $sformatf("all cycle types seen %0d %0d %0d", n_t3a, n_wr, n_int));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
