// Shared types and constants of the educational computer.
//
// The machine has eight numbered registers: 0 accumulator, 1-4 general
// purpose, 5 store-addressing register, 6 program counter and 7 the store
// location addressed through register 5. Data moves between them over one
// 8-bit bus through "gates"; the gate set below is what a lamp on the panel
// shows and what the microprogram or the panel push-buttons open.
//
// The processor state counter is one-hot: state k (1..8) is bit 8-k, so
// state 8 (end of instruction / manual) is 8'o001 and state 4 is 8'o020,
// matching the state values the machine's state indicator shows.
package edu_pkg;

  localparam int unsigned W = 8;            // word length

  localparam logic [2:0] R_ACC   = 3'd0;
  localparam logic [2:0] R_SA    = 3'd5;    // store-addressing register
  localparam logic [2:0] R_PC    = 3'd6;
  localparam logic [2:0] R_STORE = 3'd7;

  typedef enum logic [1:0] {
    ALU_ADD = 2'd0,
    ALU_SUB = 2'd1,
    ALU_AND = 2'd2,
    ALU_OR  = 2'd3
  } alu_fn_e;

  typedef enum logic [1:0] {
    ROP_CLR = 2'd0,
    ROP_CPL = 2'd1,
    ROP_INC = 2'd2,
    ROP_DEC = 2'd3
  } reg_op_e;

  typedef enum logic [1:0] {
    MODE_MANUAL     = 2'd0,
    MODE_ONE_BIT    = 2'd1,
    MODE_ONE_INSTR  = 2'd2,
    MODE_CONTINUOUS = 2'd3
  } mode_e;

  // Store-address source gates.
  typedef enum logic [1:0] {
    SA_NONE = 2'd0,
    SA_IN0  = 2'd1,
    SA_REG5 = 2'd2,
    SA_PC   = 2'd3
  } sa_src_e;

  // Instruction-register source gates.
  typedef enum logic [1:0] {
    IR_NONE  = 2'd0,
    IR_STORE = 2'd1,
    IR_IN0   = 2'd2
  } ir_src_e;

  // The level gates of the machine. reg_to_bus and bus_to_reg are indexed by
  // register number, bit 7 being the store.
  typedef struct packed {
    logic [7:0] reg_to_bus;    // at most one set
    logic       in0_to_bus;    // toggle switches (input 0) onto the bus
    logic [7:0] bus_to_reg;    // any number set
    logic       bus_to_alu;    // accumulator and bus into the ALU
    logic       alu_to_acc;    // ALU result into the accumulator
    sa_src_e    sa_src;
    ir_src_e    ir_src;
  } gates_t;

  localparam gates_t GATES_CLOSED = '{reg_to_bus: '0, in0_to_bus: 1'b0,
                                      bus_to_reg: '0, bus_to_alu: 1'b0,
                                      alu_to_acc: 1'b0, sa_src: SA_NONE,
                                      ir_src: IR_NONE};

  // One-cycle actions that are not gates.
  typedef struct packed {
    logic       reg_op;        // apply op_fn to registers in op_mask
    reg_op_e    op_fn;
    logic [6:0] op_mask;
    logic       pc_inc;
    logic       shift_l;
    logic       shift_r;
    logic       alu_fn_load;   // remember alu_fn as the ALU function
    alu_fn_e    alu_fn;
  } pulses_t;

  localparam pulses_t PULSES_NONE = '{reg_op: 1'b0, op_fn: ROP_CLR,
                                      op_mask: '0, pc_inc: 1'b0,
                                      shift_l: 1'b0, shift_r: 1'b0,
                                      alu_fn_load: 1'b0, alu_fn: ALU_ADD};

  // Decoded instruction: the sixteen types of the decoder indicator words.
  // ind_a bits 7..0: halt, 1XY copy, 30-33 input/output, 34X load immediate,
  //                  35 jump if set, 36 jump if clear, 37 shift, 0XY no-op.
  // ind_b bits 7..0: 20X clear, 21X complement, 22X increment, 23X decrement,
  //                  24X add, 25X subtract, 26X AND, 27X OR.
  typedef struct packed {
    logic [7:0] ind_a;
    logic [7:0] ind_b;
    logic [2:0] x;             // destination / operand register field
    logic [2:0] y;             // source register field of 1XY
  } decoded_t;

  localparam int unsigned IA_HALT = 7, IA_COPY = 6, IA_IO = 5, IA_LDI = 4,
                          IA_JT = 3, IA_JF = 2, IA_SHIFT = 1, IA_NOP = 0;

  // One-hot processor states.
  localparam logic [7:0] ST1 = 8'o200, ST2 = 8'o100, ST3 = 8'o040,
                         ST4 = 8'o020, ST5 = 8'o010, ST6 = 8'o004,
                         ST7 = 8'o002, ST8 = 8'o001;

endpackage
