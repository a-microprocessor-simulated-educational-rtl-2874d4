// Self-checking test of if_shift_reg: a 32-word recirculating queue model
// is shifted, written and compared at the output.
module tb_if_shift_reg;
  logic clk = 0, shift, write; logic [7:0] din, q;
  logic [7:0] model [32];
  int checks = 0, failures = 0;
  if_shift_reg dut (.*);
  always #5 clk = ~clk;
  task automatic check(logic ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin : watchdog
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [7:0] nq;
    foreach (model[i]) model[i] = 0;
    shift = 0; write = 0; din = 0;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      check(q == model[31], "output is the last word");
      shift = 1'($urandom); write = 1'($urandom); din = 8'($urandom);
      @(posedge clk);
      if (shift) begin
        nq = write ? din : model[31];
        for (int k = 31; k > 0; k--) model[k] = model[k-1];
        model[0] = nq;
      end
    end
    // 32 shifts without writing bring every word back
    @(negedge clk); shift = 1; write = 0;
    begin
      logic [7:0] snap [32];
      foreach (snap[k]) snap[k] = model[k];
      repeat (32) @(negedge clk);
      shift = 0;
      check(q == snap[31], "recirculates after 32 shifts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
