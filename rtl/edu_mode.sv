// Mode sequencer of the educational computer.
//
// The machine has four modes, chosen by a selector: manual (only the panel
// buttons act), one-bit (each press of start carries out one state of the
// current instruction), one-instruction (start carries out the rest of the
// instruction at the selected speed; holding stop freezes it between states)
// and continuous (instructions follow one another at the selected speed until
// stop is held at the end of an instruction or a halt instruction is met).
// Whenever a run ends (one-bit or one-instruction reaching the end of the
// instruction, continuous stopped or halted, or the selector turned to
// manual) the panel becomes live again and the state counter is put back to
// state 8.
//
// Entry from manual needs a mode other than manual and a 0-to-1 change of the
// start button. Between states the sequencer waits DELAY_BASE >> speed clock
// cycles (speed 0 slowest, each position halving the delay) and none at all
// at speed 7. With the 10 MHz system clock the default gives about 2 s per
// state at the slowest setting.
// Interface: step is a one-cycle request to edu_control; end_of_instr and
// halt describe the state it has reached; running is low while the panel is
// live; to_manual forces state 8.
// Timing: the decision after a step is taken in the cycle after it, when
// the new state is visible; steps are therefore at least two cycles apart.
module edu_mode
  import edu_pkg::*;
#(
  parameter int unsigned DELAY_BASE = 20_000_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  mode_e       mode,
  input  logic [2:0]  speed,
  input  logic        start_btn,
  input  logic        stop_btn,
  input  logic        end_of_instr,
  input  logic        halt,
  output logic        step,
  output logic        running,
  output logic        to_manual
);

  typedef enum logic [1:0] {S_MANUAL, S_CHECK, S_WAIT_START, S_DELAY} seq_e;
  seq_e        seq;
  logic        start_q, start_rise;
  logic [31:0] dcount;
  logic [31:0] dlen;

  assign start_rise = start_btn && !start_q;
  assign dlen       = (speed == 3'd7) ? 32'd0 : 32'(DELAY_BASE) >> speed;
  assign running    = (seq != S_MANUAL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq       <= S_MANUAL;
      start_q   <= 1'b0;
      step      <= 1'b0;
      to_manual <= 1'b0;
      dcount    <= '0;
    end else begin
      start_q   <= start_btn;
      step      <= 1'b0;
      to_manual <= 1'b0;
      unique case (seq)
        S_MANUAL: if (mode != MODE_MANUAL && start_rise) begin
          step <= 1'b1;
          seq  <= S_CHECK;
        end
        S_CHECK: if (!step) begin
          if (mode == MODE_MANUAL || (end_of_instr && halt)) begin
            seq <= S_MANUAL; to_manual <= 1'b1;
          end else begin
            unique case (mode)
              MODE_ONE_BIT:
                if (end_of_instr) begin seq <= S_MANUAL; to_manual <= 1'b1; end
                else seq <= S_WAIT_START;
              MODE_ONE_INSTR:
                if (end_of_instr) begin seq <= S_MANUAL; to_manual <= 1'b1; end
                else if (!stop_btn) begin seq <= S_DELAY; dcount <= dlen; end
              default:
                if (end_of_instr && stop_btn) begin seq <= S_MANUAL; to_manual <= 1'b1; end
                else begin seq <= S_DELAY; dcount <= dlen; end
            endcase
          end
        end
        S_WAIT_START:
          if (mode != MODE_ONE_BIT) begin seq <= S_MANUAL; to_manual <= 1'b1; end
          else if (start_rise) begin step <= 1'b1; seq <= S_CHECK; end
        S_DELAY:
          if (dcount == 0) begin step <= 1'b1; seq <= S_CHECK; end
          else dcount <= dcount - 1'b1;
      endcase
    end
  end

endmodule
