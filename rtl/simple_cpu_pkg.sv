// simple_cpu_pkg: widths, opcodes, phases and the control-word type shared by the
// SimpleCPU modules.
//
// The machine is an 8-bit accumulator computer with 16-bit instructions of the form
// OOOO XXXX DDDDDDDD: a 4-bit opcode, 4 unused bits and an 8-bit operand that is either
// an immediate constant (KK) or a memory address (AA). The opcode values and the
// control signals follow the instruction-set and control-logic tables of the design;
// the packing of the signals into a struct is this implementation's own choice.
package simple_cpu_pkg;

  localparam int unsigned DATA_W   = 8;   // accumulator, ALU and data width
  localparam int unsigned ADDR_W   = 8;   // program counter and address bus width
  localparam int unsigned INSTR_W  = 16;  // memory word and instruction width
  localparam int unsigned OPCODE_W = 4;   // opcode field, IR[15:12]
  localparam int unsigned NUM_OPS  = 1 << OPCODE_W;

  typedef logic [DATA_W-1:0]  data_t;
  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [INSTR_W-1:0] word_t;

  // Opcodes, IR[15:12]. Values 11 to 15 are unused (spare decoder outputs).
  typedef enum logic [OPCODE_W-1:0] {
    OP_MOVE   = 4'd0,   // ACC <- KK
    OP_ADD    = 4'd1,   // ACC <- ACC + KK
    OP_SUB    = 4'd2,   // ACC <- ACC - KK
    OP_AND    = 4'd3,   // ACC <- ACC & KK
    OP_LOAD   = 4'd4,   // ACC <- M[AA]
    OP_STORE  = 4'd5,   // M[AA] <- ACC
    OP_ADDM   = 4'd6,   // ACC <- ACC + M[AA]
    OP_SUBM   = 4'd7,   // ACC <- ACC - M[AA]
    OP_JUMPU  = 4'd8,   // PC <- AA
    OP_JUMPZ  = 4'd9,   // if Z=1 PC <- AA else PC <- PC + 1
    OP_JUMPNZ = 4'd10   // if Z=0 PC <- AA else PC <- PC + 1
  } opcode_e;

  // ALU function, the three ACC_CTL lines as {ACC_CTL2, ACC_CTL1, ACC_CTL0}.
  typedef enum logic [2:0] {
    ALU_ADD  = 3'b000,  // A + B
    ALU_SUB  = 3'b001,  // A - B       (ACC_CTL0 = SUB # SUBM)
    ALU_AND  = 3'b010,  // A & B       (ACC_CTL1 = AND)
    ALU_PASS = 3'b100   // B           (ACC_CTL2 = MOVE # LOAD)
  } alu_ctl_e;

  // One-hot instruction phase from the ring counter: {EXECUTE, DECODE, FETCH}.
  typedef struct packed {
    logic execute;
    logic decode;
    logic fetch;
  } phase_t;

  // The control word: one field per control line of the control-logic table.
  typedef struct packed {
    logic       rom_en;    // instruction read enable
    logic       ram_en;    // data read/write enable
    logic       ram_wr;    // data write
    logic       addr_sel;  // address bus: 0 = PC, 1 = IR[7:0]
    logic       data_sel;  // ALU operand B: 0 = IR[7:0] (KK), 1 = memory data
    logic [2:0] acc_ctl;   // ALU function {ACC_CTL2, ACC_CTL1, ACC_CTL0}
    logic       acc_en;    // accumulator load
    logic       ir_en;     // instruction register load
    logic       pc_ld;     // PC loads the jump address (otherwise increments)
    logic       pc_en;     // PC update enable
  } ctl_t;

endpackage
