// Self-checking test of cb_ram: random writes and reads against a model,
// output disabled when deselected or writing.
module tb_cb_ram;
  logic clk = 0, cs, wr; logic [7:0] addr, din, dout; logic oe;
  logic [7:0] model [256];
  int checks = 0, failures = 0;
  cb_ram dut (.*);
  always #5 clk = ~clk;
  task automatic check(logic ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin : watchdog
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    foreach (model[i]) model[i] = 0;
    cs = 0; wr = 0; addr = 0; din = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      cs = ($urandom_range(0, 3) != 0); wr = 1'($urandom); addr = 8'($urandom); din = 8'($urandom);
      #1;
      check(oe == (cs && !wr), "output enable");
      check(dout == ((cs && !wr) ? model[addr] : 8'h00), "read data");
      @(posedge clk);
      if (cs && wr) model[addr] = din;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
