// Self-checking test of edu_store: address gates from the three sources,
// address held with no gate open, writes and reads over the whole store.
module tb_edu_store;
  import edu_pkg::*;
  logic clk = 0, rst_n = 0;
  sa_src_e sa_src;
  logic [7:0] in0, reg5, pc, din, sar, dout;
  logic we;
  logic [7:0] model [256];
  int checks = 0, failures = 0;

  edu_store dut (.*);
  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp_a;
    sa_src = SA_NONE; {in0, reg5, pc, din, we} = '0;
    for (int i = 0; i < 256; i++) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    exp_a = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in0 = 8'($urandom); reg5 = 8'($urandom); pc = 8'($urandom);
      sa_src = sa_src_e'($urandom % 4);
      @(negedge clk);
      case (sa_src)
        SA_IN0:  exp_a = in0;
        SA_REG5: exp_a = reg5;
        SA_PC:   exp_a = pc;
        default: ;
      endcase
      sa_src = SA_NONE;
      check(sar == exp_a, "store address register");
      check(dout == model[exp_a], "read");
      if ($urandom % 2) begin
        din = 8'($urandom); we = 1;
        @(negedge clk); we = 0;
        model[exp_a] = din;
        check(dout == din, "read after write");
      end
    end
    // gate opened and write made in the same cycle: the new address is used
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      reg5 = 8'($urandom); din = 8'($urandom);
      sa_src = SA_REG5; we = 1;
      #1 check(dout == model[reg5], "read follows an open gate at once");
      @(negedge clk);
      sa_src = SA_NONE; we = 0;
      model[reg5] = din;
      check(sar == reg5 && dout == din, "write with the gate opening");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
