// Self-checking test of mp_interface, driven through the computer board
// (mp_board) by the 8008 bus-cycle model: random writes and reads of the
// 32 shift-register locations on page 77 (each waits for its word to come
// round, so WAIT states appear), input cycles reading each switch group,
// and the display drive: whenever a word line is on, the bit lines carry
// the word stored at that location.
module tb_mp_interface;
  logic clk = 0, rst_n = 0;
  logic phi1, phi2, sync; logic [2:0] s; logic [7:0] cpu_dout, cpu_din; logic cpu_drive;
  logic ready, intr;
  logic [7:0] rom_addr; logic [3:0] rom_cs_n;
  logic [7:0] hi_addr, lo_addr, odata, mem_data, in_data; logic wr, mem_oe, if_ready;
  logic t3a, wait_n, stop_n;
  logic [15:0][7:0] sw; logic [7:0] bit_lines; logic [31:0] word_lines; logic [4:0] position;
  logic [7:0] model [32];
  int checks = 0, failures = 0, lit = 0;
  localparam logic [31:0] MASK = 32'hFFD5_9555;

  mp_board u_board (.clk, .rst_n, .phi1, .phi2, .sync, .s, .cpu_dout, .cpu_drive,
    .cpu_din, .ready, .intr, .run(1'b1), .step_btn(1'b0), .int_btn(1'b0),
    .auto_start(1'b0), .rom_addr, .rom_cs_n, .rom_data(8'h00), .hi_addr, .lo_addr,
    .odata, .wr, .if_mem_data(mem_data), .if_mem_oe(mem_oe), .if_in_data(in_data),
    .if_ready, .t3a, .wait_n, .stop_n);
  mp_interface dut (.clk, .rst_n, .hi_addr, .lo_addr, .odata, .wr, .phi2, .sync,
    .mem_data, .mem_oe, .in_data, .ready(if_ready), .sw, .bit_lines, .word_lines, .position);
  i8008_bus_model cpu (.phi1, .phi2, .sync, .s, .cpu_dout, .cpu_drive, .cpu_din, .ready, .intr);
  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  // display: a lit word line shows its location's contents
  always @(negedge clk) if (rst_n && word_lines != 0) begin
    int p;
    p = $clog2(word_lines);
    check($onehot(word_lines) && MASK[p], "one displayed word line");
    check(bit_lines == model[p], $sformatf("display of location %0d", p));
    lit++;
  end

  initial begin : watchdog
    repeat (5_000_000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] d, v; logic [4:0] a;
    foreach (model[i]) model[i] = 0;
    for (int g = 0; g < 16; g++) sw[g] = 8'($urandom);
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 150; i++) begin
      a = 5'($urandom); v = 8'($urandom);
      if ($urandom_range(0, 1)) begin
        cpu.cycle(2'b11, {6'o77, 3'b000, a}, v, d); model[a] = v;
      end else begin
        cpu.cycle(2'b00, {6'o77, 3'b000, a}, 8'h00, d);
        check(d == model[a], $sformatf("read of location %0d: %h vs %h", a, d, model[a]));
      end
    end
    check(cpu.waits > 100, "reads and writes wait for their word");
    for (int g = 0; g < 16; g++) begin
      cpu.cycle(2'b10, {6'o00, 4'h0, 4'(g)}, 8'h00, d);
      check(d == ((g == 13 || g == 14) ? 8'h00 : sw[g]), $sformatf("switch group %0d", g));
    end
    check(lit > 1000, "display was driven");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
