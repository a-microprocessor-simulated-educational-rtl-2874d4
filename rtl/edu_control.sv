// Processor state counter and microprogram of the educational computer.
//
// Every instruction is carried out in eight processor states, one per step.
// States 5 to 8 are the same for all instructions: state 5 opens the gate
// from the program counter to the store address register; state 6 closes it
// and opens the gate from the store to the instruction register (the next
// instruction is fetched and decoded); state 7 closes that gate and
// increments the program counter; state 8 is the end of the instruction,
// where the machine stops to manual operation if it holds a halt.
// States 1 to 4 depend on the instruction (y = source, x = destination):
//   1XY copy    : 1 reg5->SA | 2 - | 3 Y->bus, bus->X | 4 -
//   30X input   : 1 reg5->SA | 2 - | 3 input0->bus, bus->X | 4 -
//   34X load imm: 1 PC->SA | 2 PC+1 | 3 store->bus, bus->X | 4 -
//   35/36 jump  : taken: 1 PC->SA | 2 - | 3 store->bus, bus->PC | 4 -
//                 not taken: 1 PC+1, skip to 4
//   24X-27X ALU : 1 select function, reg5->SA, X->bus | 2 X->bus, bus->ALU
//                 | 3 - | 4 ALU->acc
//   20X-23X     : 1 clear/complement/increment/decrement X (not 7), skip
//   37 shift    : 1 shift (LSB of the instruction: 0 right, 1 left), skip
//   halt, no-op, 31X-33X: 1 skip to 4
// "Skip" loads the state counter with state 4 at once, as the original
// machine did, so that a skipped instruction appears to dwell in state 4.
// Jump 35 is taken if any flag selected by the C,N,Z bits is 1; 36 if any
// selected flag is 0 (the flags are complemented before the same test).
//
// Interface: one-hot state (state k is bit 8-k). step advances one state;
// to_manual returns the counter to state 8 and closes the gates. gates are
// levels held for the whole state; pulses last the one cycle after the step.
// Timing: state, gates and pulses all register on the clock edge of step.
// Reset puts the machine in state 8 with every gate closed.
// Only the instruction bits not already decoded into dec are read here.
module edu_control
  import edu_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           step,
  input  logic           to_manual,
  input  logic [W-1:0]   ir,
  input  decoded_t       dec,
  input  logic           flag_c,
  input  logic           flag_n,
  input  logic           flag_z,
  output logic [7:0]     state,
  output gates_t         gates,
  output pulses_t        pulses
);

  logic [7:0] nxt_state, st_d;
  gates_t     g_d;
  pulses_t    p_d;
  logic       is_alu, is_regop, jump_ok;

  assign nxt_state = {state[0], state[7:1]};
  assign is_alu    = |dec.ind_b[3:0];
  assign is_regop  = |dec.ind_b[7:4];
  assign jump_ok   = dec.ind_a[IA_JT] ? |(dec.y & {flag_c, flag_n, flag_z})
                                      : |(dec.y & ~{flag_c, flag_n, flag_z});

  always_comb begin
    st_d = nxt_state;
    g_d  = GATES_CLOSED;
    p_d  = PULSES_NONE;
    unique case (nxt_state)
      ST1: begin
        if (dec.ind_a[IA_COPY] || (dec.ind_a[IA_IO] && ir[5:3] == 3'o0)) begin
          g_d.sa_src = SA_REG5;
        end else if (is_alu) begin
          p_d.alu_fn_load     = 1'b1;
          p_d.alu_fn          = alu_fn_e'(ir[4:3]);
          g_d.sa_src          = SA_REG5;
          g_d.reg_to_bus[dec.x] = 1'b1;
        end else if (dec.ind_a[IA_LDI] ||
                     ((dec.ind_a[IA_JT] || dec.ind_a[IA_JF]) && jump_ok)) begin
          g_d.sa_src = SA_PC;
        end else begin
          st_d = ST4;
          if (dec.ind_a[IA_JT] || dec.ind_a[IA_JF]) p_d.pc_inc = 1'b1;
          if (is_regop && dec.x != R_STORE) begin
            p_d.reg_op  = 1'b1;
            p_d.op_fn   = reg_op_e'(ir[4:3]);
            p_d.op_mask = 7'(1 << dec.x);
          end
          if (dec.ind_a[IA_SHIFT]) begin
            p_d.shift_l = ir[0];
            p_d.shift_r = ~ir[0];
          end
        end
      end
      ST2: begin
        if (is_alu) begin
          g_d.reg_to_bus[dec.x] = 1'b1;
          g_d.bus_to_alu        = 1'b1;
        end
        if (dec.ind_a[IA_LDI]) p_d.pc_inc = 1'b1;
      end
      ST3: begin
        if (dec.ind_a[IA_COPY]) begin
          g_d.reg_to_bus[dec.y] = 1'b1;
          g_d.bus_to_reg[dec.x] = 1'b1;
        end else if (dec.ind_a[IA_IO]) begin
          g_d.in0_to_bus        = 1'b1;
          g_d.bus_to_reg[dec.x] = 1'b1;
        end else if (dec.ind_a[IA_LDI]) begin
          g_d.reg_to_bus[R_STORE] = 1'b1;
          g_d.bus_to_reg[dec.x]   = 1'b1;
        end else if (dec.ind_a[IA_JT] || dec.ind_a[IA_JF]) begin
          g_d.reg_to_bus[R_STORE] = 1'b1;
          g_d.bus_to_reg[R_PC]    = 1'b1;
        end
      end
      ST4: begin
        if (is_alu) g_d.alu_to_acc = 1'b1;
      end
      ST5: g_d.sa_src = SA_PC;
      ST6: g_d.ir_src = IR_STORE;
      ST7: p_d.pc_inc = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= ST8;
      gates  <= GATES_CLOSED;
      pulses <= PULSES_NONE;
    end else if (to_manual) begin
      state  <= ST8;
      gates  <= GATES_CLOSED;
      pulses <= PULSES_NONE;
    end else if (step) begin
      state  <= st_d;
      gates  <= g_d;
      pulses <= p_d;
    end else begin
      pulses <= PULSES_NONE;
    end
  end

  // The state counter is always one-hot.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(state));

endmodule
