// Self-checking test of cb_clockgen: measures the widths of phi1, phi2, the
// gaps between them and the period over many cycles, and checks that the
// two phases never overlap.
module tb_cb_clockgen;
  logic clk = 0, rst_n = 0, phi1, phi2;
  int checks = 0, failures = 0;
  cb_clockgen dut (.*);
  always #5 clk = ~clk;
  task automatic check(logic ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin : watchdog
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int t = 0, r1 = -1, f1 = -1, r2 = -1, f2 = -1, last_r1 = -1;
    logic p1 = 0, p2 = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (2000) begin
      @(posedge clk); #1; t++;
      check(!(phi1 && phi2), "phases overlap");
      if (phi1 && !p1) begin
        if (last_r1 >= 0) check(t - last_r1 == 20, $sformatf("period %0d at %0d", t - last_r1, t));
        last_r1 = t; r1 = t;
      end
      if (!phi1 && p1) begin f1 = t; check(f1 - r1 == 7, $sformatf("phi1 width %0d at %0d", f1 - r1, t)); end
      if (phi2 && !p2) begin r2 = t; check(r2 - f1 == 2, "phi1 to phi2 gap"); end
      if (!phi2 && p2) begin f2 = t; check(f2 - r2 == 7, "phi2 width"); end
      p1 = phi1; p2 = phi2;
    end
    check(last_r1 > 1900 && r2 > 1900 && f2 > 1900, "edges seen to the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
