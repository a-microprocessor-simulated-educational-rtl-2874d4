// Self-checking test of edu_decoder: all 256 instructions decoded against
// the instruction table, loaded alternately from the store and input 0.
module tb_edu_decoder;
  import edu_pkg::*;
  logic clk = 0, rst_n = 0;
  ir_src_e ir_src;
  logic [7:0] store_dout, in0, ir;
  decoded_t dec;
  int checks = 0, failures = 0;

  edu_decoder dut (.*);
  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ea, eb; logic [2:0] ex;
    ir_src = IR_NONE; store_dout = 0; in0 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      if (i % 2) begin in0 = 8'(i); store_dout = ~8'(i); ir_src = IR_IN0; end
      else       begin store_dout = 8'(i); in0 = ~8'(i); ir_src = IR_STORE; end
      @(negedge clk);
      ir_src = IR_NONE; store_dout = 8'hAA; in0 = 8'h55;
      @(negedge clk);
      check(ir == 8'(i), "instruction register load and hold");
      ea = 0; eb = 0; ex = 3'(i);
      if (i == 0 || i == 255) ea = 8'b1000_0000;
      else if (i < 64)        ea = 8'b0000_0001;
      else if (i < 128)     begin ea = 8'b0100_0000; ex = 3'(i >> 3); end
      else if (i < 192)       eb = 8'b1000_0000 >> ((i >> 3) & 7);
      else case ((i >> 3) & 7)
        0, 1, 2, 3: ea = 8'b0010_0000;
        4: ea = 8'b0001_0000;
        5: ea = 8'b0000_1000;
        6: ea = 8'b0000_0100;
        default: ea = 8'b0000_0010;
      endcase
      check(dec.ind_a == ea && dec.ind_b == eb, $sformatf("type of %o", i));
      check(dec.x == ex && dec.y == 3'(i), $sformatf("fields of %o", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
