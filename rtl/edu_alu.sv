// Arithmetic and logic unit of the educational computer, with its flags.
//
// The ALU takes the accumulator and the data bus, and performs one of four
// functions: add and subtract in two's complement, AND and OR. The selected
// function is remembered (and shown on the panel) until another one is
// selected, because manual operation needs it to persist; after reset it is
// ADD. While the bus-to-ALU gate is open the result is computed and held in
// the result register together with the flags: Carry (carry out of the most
// significant bit; for subtract it is the borrow, as on the microprocessor
// whose flags the original machine displayed), Negative (MSB of the result)
// and Zero. AND and OR clear Carry. The result reaches the accumulator only
// through the separate ALU-to-accumulator gate, outside this block.
//
// The accumulator shifts also live here because they use the Carry flag:
// shift right copies Carry into the MSB and drops the LSB (Carry unchanged);
// shift left puts 0 into the LSB and moves the MSB into Carry. shift_dout is
// the shifted accumulator, valid in the cycle shift_l or shift_r is high.
// Timing: the function, result and flags register at the rising clock edge.
module edu_alu
  import edu_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           fn_load,
  input  alu_fn_e        fn_in,
  input  logic           compute,      // bus-to-ALU gate open
  input  logic [W-1:0]   acc,
  input  logic [W-1:0]   bus,
  input  logic           shift_l,
  input  logic           shift_r,
  output alu_fn_e        fn,
  output logic [W-1:0]   result,
  output logic           flag_c,
  output logic           flag_n,
  output logic           flag_z,
  output logic [W-1:0]   shift_dout
);

  logic [W:0]   sum;
  logic [W-1:0] res_d;
  logic         c_d;

  always_comb begin
    sum   = '0;
    res_d = '0;
    c_d   = 1'b0;
    case (fn)
      ALU_ADD: begin
        sum   = {1'b0, acc} + {1'b0, bus};
        res_d = sum[W-1:0];
        c_d   = sum[W];
      end
      ALU_SUB: begin
        sum   = {1'b0, acc} - {1'b0, bus};
        res_d = sum[W-1:0];
        c_d   = sum[W];                // borrow
      end
      ALU_AND: res_d = acc & bus;
      default: res_d = acc | bus;
    endcase
  end

  always_comb begin
    if (shift_r) shift_dout = {flag_c, acc[W-1:1]};
    else         shift_dout = {acc[W-2:0], 1'b0};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fn     <= ALU_ADD;
      result <= '0;
      flag_c <= 1'b0;
      flag_n <= 1'b0;
      flag_z <= 1'b0;
    end else begin
      if (fn_load) fn <= fn_in;
      if (compute) begin
        result <= res_d;
        flag_c <= c_d;
        flag_n <= res_d[W-1];
        flag_z <= (res_d == '0);
      end else if (shift_l) begin
        flag_c <= acc[W-1];
      end
    end
  end

endmodule
