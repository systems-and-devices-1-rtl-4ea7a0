// decode_logic: the sum-of-products logic that generates every control line from the
// current phase, the one-hot opcode lines and the zero flag.
//
// The equations are those of the control-logic table:
//   ROM_EN   = FETCH
//   RAM_EN   = (DECODE | EXECUTE) & (LOAD | STORE | ADDM | SUBM)
//   RAM_WR   = STORE & EXECUTE
//   ADDR_SEL = (DECODE | EXECUTE) & (LOAD | STORE | ADDM | SUBM)
//   DATA_SEL = LOAD | ADDM | SUBM
//   ACC_CTL0 = SUB | SUBM,  ACC_CTL1 = AND,  ACC_CTL2 = MOVE | LOAD
//   ACC_EN   = (MOVE | ADD | SUB | AND | LOAD | ADDM | SUBM) & EXECUTE
//   IR_EN    = FETCH
//   PC_LD    = EXECUTE & J
//   PC_EN    = (DECODE & !J) | (EXECUTE & J)
//   J        = JUMPU | (JUMPZ & Z) | (JUMPNZ & !Z)
// J is taken as the OR of its three terms, which is what the instruction set requires
// (JUMPNZ jumps when Z = 0); an AND between the last two terms could never be true.
// Purely combinational. Twelve control lines in all. ROM_EN and IR_EN are the FETCH
// line itself, and the spare decoder lines Y11..Y15 are not used by any equation, so
// an unused opcode runs as a no-op that only advances the PC.
//
// Ports: phase (one-hot), op (one-hot opcode lines Y0..Y15), z (accumulator is zero),
// ctl (control word).
module decode_logic
  import simple_cpu_pkg::*;
(
  input  phase_t             phase,
  input  logic [NUM_OPS-1:0] op,
  input  logic               z,
  output ctl_t               ctl
);

  logic move, add, sub, and_op, load, store, addm, subm, jumpu, jumpz, jumpnz;
  logic mem_op, j;

  assign move   = op[OP_MOVE];
  assign add    = op[OP_ADD];
  assign sub    = op[OP_SUB];
  assign and_op = op[OP_AND];
  assign load   = op[OP_LOAD];
  assign store  = op[OP_STORE];
  assign addm   = op[OP_ADDM];
  assign subm   = op[OP_SUBM];
  assign jumpu  = op[OP_JUMPU];
  assign jumpz  = op[OP_JUMPZ];
  assign jumpnz = op[OP_JUMPNZ];

  assign mem_op = load | store | addm | subm;
  assign j      = jumpu | (jumpz & z) | (jumpnz & ~z);

  always_comb begin
    ctl.rom_en   = phase.fetch;
    ctl.ram_en   = (phase.decode | phase.execute) & mem_op;
    ctl.ram_wr   = store & phase.execute;
    ctl.addr_sel = (phase.decode | phase.execute) & mem_op;
    ctl.data_sel = load | addm | subm;
    ctl.acc_ctl  = {move | load, and_op, sub | subm};
    ctl.acc_en   = (move | add | sub | and_op | load | addm | subm) & phase.execute;
    ctl.ir_en    = phase.fetch;
    ctl.pc_ld    = phase.execute & j;
    ctl.pc_en    = (phase.decode & ~j) | (phase.execute & j);
  end

endmodule
