// Self-checking test of if_logic: the position counter steps once per
// falling edge of sync and wraps after 32; ready, write, the output gate and
// the blanked word line drive are compared with their definitions each
// cycle; the number of displayed locations is counted over a full turn.
module tb_if_logic;
  localparam logic [31:0] MASK = 32'hFFD5_9555;
  localparam int BLANK = 5;
  logic clk = 0, rst_n = 0, sr_sel, wr, phi2, sync;
  logic [4:0] lo, position; logic sr_shift, sr_write, sr_gate, ready;
  logic [31:0] word_lines;
  int checks = 0, failures = 0;

  if_logic dut (.*);
  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (500_000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int exp_pos = 0, since = 100, lit_seen = 0, shifts = 0;
    logic [31:0] lit;
    sr_sel = 0; wr = 0; phi2 = 0; sync = 0; lo = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    lit = 0;
    for (int c = 0; c < 40 * 80; c++) begin
      // sync: 20 clocks high, 20 low; phi2 in each half
      sync = ((c % 40) < 20);
      phi2 = ((c % 20) >= 9 && (c % 20) < 16);
      if (c % 40 == 0) begin
        sr_sel = 1'($urandom); lo = 5'($urandom); wr = 1'($urandom);
      end
      @(posedge clk);
      if (sr_shift) begin exp_pos = (exp_pos + 1) % 32; since = 0; shifts++; end
      else since++;
      @(negedge clk);
      check(position == 5'(exp_pos), "position counter");
      check(ready == ((position == lo) || (!sr_sel && phi2 && !sync)), "ready");
      check(sr_write == (sr_sel && wr), "write");
      check(sr_gate == (MASK[position] || (sr_sel && position == lo)), "output gate");
      if (since < BLANK) check(word_lines == 0, "blanked after a count");
      else check(word_lines == (MASK[position] ? (32'd1 << position) : 32'd0), "word line");
      lit |= word_lines;
    end
    check(shifts == 80, $sformatf("one count per sync fall: %0d", shifts));
    check($countones(lit) == $countones(MASK), "every displayed location lit");
    $display("displayed locations: %0d", $countones(lit));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
