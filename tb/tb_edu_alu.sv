// Self-checking test of edu_alu: every function on random operands, flags,
// remembered function, and both accumulator shifts.
module tb_edu_alu;
  import edu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic fn_load, compute, shift_l, shift_r;
  alu_fn_e fn_in, fn;
  logic [7:0] acc, bus, result, shift_dout;
  logic flag_c, flag_n, flag_z;
  int checks = 0, failures = 0;

  edu_alu dut (.*);
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
    logic [8:0] e; logic ec; logic [7:0] er;
    {fn_load, compute, shift_l, shift_r, acc, bus} = '0;
    fn_in = ALU_ADD;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(fn == ALU_ADD, "reset function is ADD");
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      fn_in = alu_fn_e'($urandom % 4); fn_load = 1;
      @(negedge clk);
      fn_load = 0;
      check(fn == fn_in, "function remembered");
      acc = 8'($urandom); bus = 8'($urandom);
      if (n % 50 == 0) bus = acc;           // zero results for SUB
      compute = 1;
      @(negedge clk);
      compute = 0;
      case (fn_in)
        ALU_ADD: begin e = acc + bus; er = e[7:0]; ec = e[8]; end
        ALU_SUB: begin er = acc - bus; ec = (acc < bus); end
        ALU_AND: begin er = acc & bus; ec = 0; end
        default: begin er = acc | bus; ec = 0; end
      endcase
      check(result == er, $sformatf("result fn=%0d %h %h -> %h", fn_in, acc, bus, result));
      check(flag_c == ec && flag_n == er[7] && flag_z == (er == 0), "flags");
      // flags and result hold while compute is low
      bus = ~bus;
      @(negedge clk);
      check(result == er, "result held");
      // shifts
      acc = 8'($urandom);
      shift_r = 1; #1;
      check(shift_dout == {ec, acc[7:1]}, "shift right");
      @(negedge clk); shift_r = 0;
      check(flag_c == ec, "shift right keeps carry");
      shift_l = 1; #1;
      check(shift_dout == {acc[6:0], 1'b0}, "shift left");
      @(negedge clk); shift_l = 0;
      check(flag_c == acc[7], "shift left carry");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
