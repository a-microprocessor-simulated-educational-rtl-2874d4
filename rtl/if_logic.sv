// Logic control unit of the display interface.
//
// A 5-bit position counter keeps track of which location of the display
// shift register is at its output: the register shifts and the counter
// advances together once per processor state, on the falling edge of sync.
// The counter drives the word lines of the LED matrix through two 4-to-16
// decoders while the register's output word drives the bit lines, so the
// panel is refreshed word by word. Locations that are not displayed
// (DISPLAY_MASK bit clear) light no word line and also close the register's
// output gate, so the bit lines rest at zero there; after every advance the
// word lines are held off for BLANK cycles to let the word drivers turn off
// before the next word appears, which keeps adjacent words from ghosting.
// The original also delayed the counter's clock by about 300 ns so that the
// slow MOS register and the TTL counter changed outputs together; here both
// are in one clock domain and change on the same edge, so no offset is used.
//
// When the processor addresses the shift register (high address page X77,
// sr_sel) the ready line is withheld until the counter equals the five low
// bits of the low address, so the processor waits in its WAIT state until
// the wanted location comes round; then the output gate opens for the
// access. For any other page ready is given in phi22, the second phi2 of
// each state (phi2 while sync is low), as the text gives. During a write
// cycle (wr, the board's write strobe, with X77) the register is switched
// from recirculate to write, so the word entering it at the next shift is
// the processor's data.
// The low address is compared on five bits only, so every location answers
// to eight addresses. The default mask lights locations 000, 002, 004, 006,
// 010, 012, 014, 017, 020, 022, 024 and 026-037 (octal).
// Interface: see the port list. Timing: all outputs registered or derived
// combinationally from registered state and the bus inputs; counting and
// shifting happen in the system clock cycle after the falling edge of sync.
module if_logic #(
  parameter logic [31:0] DISPLAY_MASK = 32'hFFD5_9555,
  parameter int unsigned BLANK        = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sr_sel,      // high address is X77
  input  logic [4:0]  lo,          // low address bits 1-5
  input  logic        wr,          // write strobe from the computer board
  input  logic        phi2,
  input  logic        sync,
  output logic        sr_shift,
  output logic        sr_write,
  output logic        sr_gate,     // shift register output gate
  output logic        ready,
  output logic [4:0]  position,
  output logic [31:0] word_lines
);

  logic       sync_q;
  logic [$clog2(BLANK+1)-1:0] blank_cnt;
  logic       equal;

  assign sr_shift = sync_q && !sync;
  assign equal    = (position == lo);
  assign ready    = equal || (!sr_sel && phi2 && !sync);
  assign sr_write = sr_sel && wr;
  assign sr_gate  = DISPLAY_MASK[position] || (sr_sel && equal);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q    <= 1'b0;
      position  <= '0;
      blank_cnt <= '0;
    end else begin
      sync_q <= sync;
      if (sr_shift) begin
        position  <= position + 1'b1;
        blank_cnt <= ($clog2(BLANK+1))'(BLANK);
      end else if (blank_cnt != 0) begin
        blank_cnt <= blank_cnt - 1'b1;
      end
    end
  end

  always_comb begin
    word_lines = '0;
    if (blank_cnt == 0 && DISPLAY_MASK[position]) word_lines[position] = 1'b1;
  end

endmodule
