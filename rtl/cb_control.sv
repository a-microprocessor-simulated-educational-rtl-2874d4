// Control logic of the computer board around the 8008 microprocessor.
//
// The 8008 reports its state on three lines S0-S2 and splits every state
// into a first half (sync = 1) and a second half (sync = 0); the phi2 pulse
// of the first half is called phi21 here and that of the second half phi22
// (phi22 = phi2 while sync is 0). This block derives from them:
//  - the decoded states T1, T2, T3, WAIT and STOPPED (active low, as from a
//    3-to-8 decoder; the S2S1S0 codes are those of the 8008: T1 = 010,
//    T2 = 100, T3 = 001, WAIT = 000, STOPPED = 011);
//  - the strobes of the address latches: low address latched by phi22 in
//    T1, high address by phi22 in T2;
//  - the bridging state T3A. The 8008 wants its input data before the end
//    of phi1 in T3, earlier than T3 can be decoded, so T3A is set at the end
//    of phi22 in T2 on every cycle but a write, and cleared in the first
//    half of T3. It enables the input and memory ports; the cycle type bits
//    of the high address (DO8 DO7: 0X memory read, 10 input) pick which;
//  - the write strobe W/R: set in phi21 of T3 of a write cycle (DO8 DO7 =
//    11), cleared by the following phi22;
//  - the ready line: from the interface when the wait/run switch is at
//    run; otherwise only during a STEP_W-cycle pulse started by the step
//    button, and then only if the interface is also ready;
//  - the interrupt: a request (the interrupt button, or one request after
//    reset when auto_start is set) is held in one flip-flop, passed to the
//    8008 at the next rising edge of sync by a second one, and both are
//    cleared when the processor reaches T2.
// The board does these with gates, monostables and D flip-flops clocked by
// the phases; here every edge is detected on a fast system clock (10 MHz
// for the default STEP_W of 50 cycles = 5 us), so each action happens on
// the first system clock edge after the event it follows.
// Decoder outputs for codes 5-7 are not used (the 8008 never shows them).
// rst_n is both the asynchronous reset and the disable of the assertion,
// which a lint tool reports as a mixed synchronous/asynchronous use.
// mem_ds1_n is DO8 itself: the memory port's select is wired straight to
// the high-address bit.
module cb_control #(
  parameter int unsigned STEP_W = 50
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       phi2,
  input  logic       sync,
  input  logic [2:0] s,           // {S2, S1, S0}
  input  logic       do7,         // high address bits 7 and 8: cycle type
  input  logic       do8,
  input  logic       run,         // wait/run switch at run
  input  logic       step_btn,
  input  logic       int_btn,
  input  logic       auto_start,
  input  logic       if_ready,    // ready from the interface
  output logic       t1_n,
  output logic       t2_n,
  output logic       t3_n,
  output logic       wait_n,
  output logic       stop_n,
  output logic       lo_latch_ds1_n,
  output logic       hi_latch_ds1_n,
  output logic       latch_ds2,
  output logic       t3a,
  output logic       mem_ds1_n,
  output logic       in_ds1_n,
  output logic       wr,
  output logic       ready,
  output logic       intr
);

  logic [7:0] st_n;
  always_comb begin
    st_n    = '1;
    st_n[s] = 1'b0;
  end
  assign wait_n = st_n[0];
  assign t3_n   = st_n[1];
  assign t1_n   = st_n[2];
  assign stop_n = st_n[3];
  assign t2_n   = st_n[4];

  logic phi21, phi22;
  assign phi21 = phi2 && sync;
  assign phi22 = phi2 && !sync;

  assign lo_latch_ds1_n = t1_n;
  assign hi_latch_ds1_n = t2_n;
  assign latch_ds2      = phi22;

  assign mem_ds1_n = do8;
  assign in_ds1_n  = !(do8 && !do7);

  // T3A bridging state
  logic t3a_clk, t3a_clk_q;
  assign t3a_clk = phi22 && !t2_n && !(do7 && do8);

  // write strobe
  logic phi22_q, wr_set;
  assign wr_set = do7 && do8 && !t3_n && phi21;

  // step pulse and interrupt synchroniser
  logic step_q, int_q, sync_q, int_req, auto_done;
  logic [$clog2(STEP_W+1)-1:0] step_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t3a_clk_q <= 1'b0;
      t3a       <= 1'b0;
      phi22_q   <= 1'b0;
      wr        <= 1'b0;
      step_q    <= 1'b0;
      step_cnt  <= '0;
      int_q     <= 1'b0;
      sync_q    <= 1'b0;
      int_req   <= 1'b0;
      intr <= 1'b0;
      auto_done <= 1'b0;
    end else begin
      t3a_clk_q <= t3a_clk;
      phi22_q   <= phi22;
      step_q    <= step_btn;
      int_q     <= int_btn;
      sync_q    <= sync;

      if (!t3_n && sync)               t3a <= 1'b0;
      else if (t3a_clk_q && !t3a_clk)  t3a <= 1'b1;

      if (wr_set)                      wr <= 1'b1;
      else if (phi22 && !phi22_q)      wr <= 1'b0;

      if (step_btn && !step_q)         step_cnt <= ($clog2(STEP_W+1))'(STEP_W);
      else if (step_cnt != 0)          step_cnt <= step_cnt - 1'b1;

      auto_done <= 1'b1;
      if (!t2_n) begin
        int_req   <= 1'b0;
        intr <= 1'b0;
      end else begin
        if ((int_btn && !int_q) || (auto_start && !auto_done)) int_req <= 1'b1;
        if (sync && !sync_q && int_req)                        intr <= 1'b1;
      end
    end
  end

  assign ready = if_ready && (run || step_cnt != 0);

  // A write strobe never overlaps the bridging state.
  a_no_t3a_on_write: assert property (@(posedge clk) disable iff (!rst_n)
                                      !(wr && t3a));

endmodule
