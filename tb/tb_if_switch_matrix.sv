// Self-checking test of if_switch_matrix: each group code reads its own
// switch group only; the two unconnected codes read zero.
module tb_if_switch_matrix;
  logic [15:0][7:0] sw; logic [3:0] code; logic [7:0] data;
  int checks = 0, failures = 0;
  if_switch_matrix dut (.*);
  task automatic check(logic ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin : watchdog
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 500; i++) begin
      for (int g = 0; g < 16; g++) sw[g] = 8'($urandom);
      code = 4'($urandom); #1;
      check(data == ((code == 13 || code == 14) ? 8'h00 : sw[code]), $sformatf("code %0d", code));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
