// Registers 0 to 6 of the educational computer.
//
// Register 0 is the accumulator, 1-4 are general purpose, 5 is the
// store-addressing register and 6 the program counter. Each can be loaded
// from the data bus and can be cleared, complemented, incremented or
// decremented, as the machine's architecture requires. The accumulator can
// also be loaded from the ALU result or from the shifter, and the program
// counter has its own increment used by the fetch sequence.
//
// Interface: bus_to_reg[r] loads register r from bus while set (a level, so
// a gate held open simply reloads the same value). reg_op applies op_fn once
// to every register in op_mask. acc_load writes acc_din (ALU result or shift
// result) into the accumulator; pc_inc increments register 6.
// Timing: all writes take effect at the rising clock edge. A write through a
// gate has priority over a register operation in the same cycle; the
// controllers never issue both to one register.
// Reset clears all registers (the machine's reset state is not described, so
// all-zero is this design's choice).
module edu_regfile
  import edu_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [W-1:0]         bus,
  input  logic [6:0]           bus_to_reg,
  input  logic                 reg_op,
  input  reg_op_e              op_fn,
  input  logic [6:0]           op_mask,
  input  logic                 acc_load,
  input  logic [W-1:0]         acc_din,
  input  logic                 pc_inc,
  output logic [6:0][W-1:0]    regs
);

  function automatic logic [W-1:0] apply_op(reg_op_e fn, logic [W-1:0] v);
    case (fn)
      ROP_CLR: return '0;
      ROP_CPL: return ~v;
      ROP_INC: return v + 1'b1;
      default: return v - 1'b1;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs <= '0;
    end else begin
      for (int r = 0; r < 7; r++) begin
        if (bus_to_reg[r])
          regs[r] <= bus;
        else if (r == 0 && acc_load)
          regs[r] <= acc_din;
        else if (r == 6 && pc_inc)
          regs[r] <= regs[r] + 1'b1;
        else if (reg_op && op_mask[r])
          regs[r] <= apply_op(op_fn, regs[r]);
      end
    end
  end

endmodule
