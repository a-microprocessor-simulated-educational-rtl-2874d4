// Self-checking test of i8212 against the data sheet truth table:
// input mode latches on STB and drives only while selected; output mode
// latches while selected and drives all the time.
module tb_i8212;
  logic clk = 0, md, ds1_n, ds2, stb; logic [7:0] din, dout; logic oe;
  logic [7:0] model;
  int checks = 0, failures = 0;
  i8212 dut (.*);
  always #5 clk = ~clk;
  task automatic check(logic ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin : watchdog
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic sel;
    md = 0; ds1_n = 1; ds2 = 0; stb = 1; din = 0;
    @(negedge clk); @(negedge clk);
    model = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      md = 1'($urandom); ds1_n = 1'($urandom); ds2 = 1'($urandom);
      stb = 1'($urandom); din = 8'($urandom);
      sel = !ds1_n && ds2;
      @(posedge clk);
      if ((!md && stb) || (md && sel)) model = din;
      #1;
      check(oe == (md || sel), "output enable");
      check(dout == ((md || sel) ? model : 8'h00), $sformatf("data %h vs %h", dout, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
