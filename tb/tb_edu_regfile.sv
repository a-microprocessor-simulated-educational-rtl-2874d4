// Self-checking test of edu_regfile: random bus loads, register operations,
// accumulator loads and program-counter increments against a reference model.
module tb_edu_regfile;
  import edu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] bus, acc_din;
  logic [6:0] bus_to_reg, op_mask;
  logic reg_op, acc_load, pc_inc;
  reg_op_e op_fn;
  logic [6:0][7:0] regs, model;
  int checks = 0, failures = 0;

  edu_regfile dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {bus, acc_din, bus_to_reg, op_mask, reg_op, acc_load, pc_inc} = '0;
    op_fn = ROP_CLR;
    model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      bus = 8'($urandom); acc_din = 8'($urandom);
      bus_to_reg = ($urandom % 4 == 0) ? 7'($urandom) : '0;
      reg_op = ($urandom % 2 == 0);
      op_fn = reg_op_e'($urandom % 4);
      op_mask = 7'($urandom) & ~bus_to_reg;
      acc_load = ($urandom % 5 == 0) && !bus_to_reg[0] && !op_mask[0];
      pc_inc = ($urandom % 5 == 0) && !bus_to_reg[6] && !op_mask[6];
      for (int r = 0; r < 7; r++) begin
        if (bus_to_reg[r]) model[r] = bus;
        else if (r == 0 && acc_load) model[r] = acc_din;
        else if (r == 6 && pc_inc) model[r] = model[r] + 1;
        else if (reg_op && op_mask[r])
          case (op_fn)
            ROP_CLR: model[r] = 0;
            ROP_CPL: model[r] = ~model[r];
            ROP_INC: model[r] = model[r] + 1;
            default: model[r] = model[r] - 1;
          endcase
      end
      @(posedge clk); #1;
      checks++;
      if (regs !== model) begin
        failures++;
        if (failures < 5) $display("mismatch at %0d: %h vs %h", n, regs, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
