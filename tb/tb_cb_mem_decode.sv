// Self-checking test of cb_mem_decode over all 64 pages: one chip select
// (or none) per page from address bits 8, 9 and 11 with bit 10 as the
// enable, the RAM page, and the shift register page 77 (octal).
module tb_cb_mem_decode;
  logic [5:0] page; logic [7:0] cs_n; logic sr_sel;
  int checks = 0, failures = 0;
  cb_mem_decode dut (.*);
  task automatic check(logic ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin : watchdog
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int p = 0; p < 64; p++) begin
      logic [7:0] exp;
      page = 6'(p); #1;
      exp = '1;
      if (!page[2]) exp[{page[3], page[1], page[0]}] = 1'b0;
      check(cs_n == exp, $sformatf("page %o", p));
      check($countones(~cs_n) <= 1, "at most one chip");
      check(sr_sel == (p == 'o77), "shift register page");
    end
    page = 6'o13; #1; check(cs_n == 8'b0111_1111, "page 13 selects the RAM line");
    page = 6'o00; #1; check(cs_n == 8'b1111_1110, "page 0 selects the first PROM");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
