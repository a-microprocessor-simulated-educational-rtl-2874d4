// Self-checking test of mp_board with a bus-cycle model of the 8008:
// reads from the four PROM sockets, writes and reads of the RAM page,
// input cycles, reads of the shift register page with the interface
// holding READY low (WAIT states), single stepping with the run/wait switch
// at wait, and the interrupt after reset.
module tb_mp_board;
  logic clk = 0, rst_n = 0;
  logic phi1, phi2, sync; logic [2:0] s; logic [7:0] cpu_dout, cpu_din; logic cpu_drive;
  logic ready, intr, run, step_btn, int_btn, auto_start;
  logic [7:0] rom_addr, rom_data; logic [3:0] rom_cs_n;
  logic [7:0] hi_addr, lo_addr, odata, if_mem_data, if_in_data; logic wr, if_mem_oe, if_ready;
  logic t3a, wait_n, stop_n;
  int checks = 0, failures = 0;
  logic [7:0] ram_model [256];
  int if_hold = 0;              // clocks the interface keeps READY low

  mp_board dut (.*);
  i8008_bus_model cpu (.phi1, .phi2, .sync, .s, .cpu_dout, .cpu_drive, .cpu_din, .ready, .intr);
  always #5 clk = ~clk;

  // PROM contents: a fixed function of socket and address
  function automatic logic [7:0] rom_fn(int sock, logic [7:0] a);
    return 8'(a * 8'd37 + sock * 8'd101 + 8'd5);
  endfunction
  always_comb begin
    rom_data = 8'h00;
    for (int k = 0; k < 4; k++) if (!rom_cs_n[k]) rom_data = rom_fn(k, rom_addr);
  end
  // interface: memory data only on page 77, input data from the low address
  assign if_mem_oe   = (hi_addr[5:0] == 6'o77);
  assign if_mem_data = if_mem_oe ? ~lo_addr : 8'h00;
  assign if_in_data  = lo_addr ^ 8'h5a;
  always @(posedge clk) if (if_hold > 0) if_hold--;
  assign if_ready = (if_hold == 0);

  task automatic check(logic ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] d, a, v; logic [13:0] ad; int w0, st;
    run = 1; step_btn = 0; int_btn = 0; auto_start = 1;
    foreach (ram_model[i]) ram_model[i] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    cpu.idle_state(); cpu.idle_state();
    check(intr, "interrupt requested after reset");
    // PROM reads, pages 0-3
    for (int i = 0; i < 40; i++) begin
      int sock = $urandom_range(0, 3);
      a = 8'($urandom);
      cpu.cycle(2'b00, {6'(sock), a}, 8'h00, d);
      check(d == rom_fn(sock, a), $sformatf("PROM %0d read at %o", sock, a));
      check(lo_addr == a && hi_addr == {2'b00, 6'(sock)}, "address latches");
    end
    check(!intr, "interrupt cleared by the cycle");
    // RAM page 13: writes then reads
    for (int i = 0; i < 60; i++) begin
      a = (i < 10) ? 8'(i * 25) : 8'($urandom_range(0, 9) * 25); v = 8'($urandom);
      if (i < 10 || $urandom_range(0, 1)) begin
        cpu.cycle(2'b11, {6'o13, a}, v, d); ram_model[a] = v;
        check(odata == v, "output data bus");
      end else begin
        cpu.cycle(2'b00, {6'o13, a}, 8'h00, d);
        check(d == ram_model[a], $sformatf("RAM read at %o", a));
      end
    end
    // input cycles
    for (int i = 0; i < 10; i++) begin
      a = 8'($urandom);
      cpu.cycle(2'b10, {6'($urandom), a}, 8'h00, d);
      check(d == (a ^ 8'h5a), "input port");
    end
    // shift register page with the interface not ready: WAIT states
    w0 = cpu.waits;
    for (int i = 0; i < 5; i++) begin
      a = 8'($urandom);
      @(posedge phi1); if_hold = 150;
      cpu.cycle(2'b00, {6'o77, a}, 8'h00, d);
      check(d == ~a, "shift register page read");
    end
    check(cpu.waits > w0, "WAIT states seen");
    // single step: ready only from the step button
    run = 0; w0 = cpu.waits;
    fork
      cpu.cycle(2'b00, {6'o01, 8'o123}, 8'h00, d);
      begin
        repeat (400) @(negedge clk);
        st = cpu.cycles;
        step_btn = 1; repeat (3) @(negedge clk); step_btn = 0;
      end
    join
    check(cpu.waits > w0 && d == rom_fn(1, 8'o123), "stepped cycle");
    run = 1;
    // interrupt button
    int_btn = 1; repeat (3) @(negedge clk); int_btn = 0;
    cpu.idle_state(); cpu.idle_state();
    check(intr, "interrupt from the button");
    cpu.cycle(2'b00, 14'h0, 8'h00, d);
    check(!intr, "interrupt acknowledged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
