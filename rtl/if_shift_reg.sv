// Display store of the interface: a recirculating shift register of WORDS
// words of 8 bits (32 in the machine).
//
// Everything the front panel shows is held here, one panel word per
// location; the locations not shown serve as scratch storage. On every
// shift the word at the output moves to the input end, so the words come
// past the output one after another and repeat every WORDS shifts. The word
// at the output drives the panel's bit lines and, when the processor
// addresses the register, its memory data bus. When write is high at a
// shift, din enters in place of the recirculated output word, which is how
// the processor overwrites the location passing the output.
// Interface: shift (one-cycle enable), write, din; q is the word at the
// output. Timing: shifts at the rising clock edge when shift is high.
// Initial contents are zero for simulation only; the original MOS register
// has no reset.
module if_shift_reg #(
  parameter int unsigned WORDS = 32
) (
  input  logic       clk,
  input  logic       shift,
  input  logic       write,
  input  logic [7:0] din,
  output logic [7:0] q
);

  logic [7:0] sr [WORDS];

  initial begin
    for (int i = 0; i < WORDS; i++) sr[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (shift) begin
      for (int i = WORDS - 1; i > 0; i--) sr[i] <= sr[i-1];
      sr[0] <= write ? din : sr[WORDS-1];
    end
  end

  assign q = sr[WORDS-1];

endmodule
