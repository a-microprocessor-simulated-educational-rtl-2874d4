// Instruction register and instruction decoder of the educational computer.
//
// The instruction register is loaded through one of two gates: from the
// store (the normal fetch) or from the input 0 toggle switches (manual use
// only). The decoder sorts the instruction, written here in octal, into the
// sixteen types shown by the two decoder indicator words:
//   ind_a: 000/377 halt, 1XY copy Y to X, 30X-33X input/output, 34X load
//          immediate, 35 jump if flag set, 36 jump if flag clear, 37 shift
//          (all but 377), 0XY no operation (all but 000);
//   ind_b: 20X clear, 21X complement, 22X increment, 23X decrement,
//          24X add, 25X subtract, 26X AND, 27X OR.
// The x field is bits 5:3 for 1XY and bits 2:0 for every other type; y is
// bits 2:0 (the source register of 1XY, the flag mask C,N,Z of 35 and 36).
// Interface: ir_src selects the gate; decoding is combinational from ir.
// Timing: ir loads at the rising clock edge; reset clears it (to a halt).
module edu_decoder
  import edu_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  ir_src_e        ir_src,
  input  logic [W-1:0]   store_dout,
  input  logic [W-1:0]   in0,
  output logic [W-1:0]   ir,
  output decoded_t       dec
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ir <= '0;
    else if (ir_src == IR_STORE) ir <= store_dout;
    else if (ir_src == IR_IN0)   ir <= in0;
  end

  logic [1:0] d1;    // first octal digit
  logic [2:0] d2;    // second octal digit
  assign d1 = ir[7:6];
  assign d2 = ir[5:3];

  always_comb begin
    dec       = '0;
    dec.x     = (d1 == 2'd1) ? ir[5:3] : ir[2:0];
    dec.y     = ir[2:0];
    case (d1)
      2'd0: if (ir == 8'o000) dec.ind_a[IA_HALT] = 1'b1;
            else              dec.ind_a[IA_NOP]  = 1'b1;
      2'd1: dec.ind_a[IA_COPY] = 1'b1;
      2'd2: dec.ind_b[7 - d2]  = 1'b1;
      default: begin
        if (ir == 8'o377)               dec.ind_a[IA_HALT]  = 1'b1;
        else if (d2 <= 3'd3)            dec.ind_a[IA_IO]    = 1'b1;
        else if (d2 == 3'd4)            dec.ind_a[IA_LDI]   = 1'b1;
        else if (d2 == 3'd5)            dec.ind_a[IA_JT]    = 1'b1;
        else if (d2 == 3'd6)            dec.ind_a[IA_JF]    = 1'b1;
        else                            dec.ind_a[IA_SHIFT] = 1'b1;
      end
    endcase
  end

endmodule
