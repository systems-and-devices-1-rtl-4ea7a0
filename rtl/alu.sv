// alu: the 8-bit arithmetic and logic unit in front of the accumulator.
//
// Operand A is always the accumulator; operand B is the immediate constant KK or the
// low byte of a memory word, chosen outside by DATA_SEL. The three ACC_CTL lines pick
// the function as the control-logic table sets them: ACC_CTL2 (MOVE, LOAD) passes B,
// ACC_CTL1 (AND) gives A & B, ACC_CTL0 (SUB, SUBM) gives A - B, and all lines low
// (ADD, ADDM) gives A + B. The decoding of the lines, with ACC_CTL2 before ACC_CTL1
// before ACC_CTL0, is this implementation's choice; the control logic never raises
// more than one of them. Arithmetic is modulo 256, with no carry or overflow output,
// since the instruction set has none. Purely combinational.
//
// Ports: ctl (ACC_CTL2..0), a (accumulator), b (operand), y (result).
module alu
  import simple_cpu_pkg::*;
(
  input  logic [2:0] ctl,
  input  data_t      a,
  input  data_t      b,
  output data_t      y
);

  always_comb begin
    if (ctl[2])      y = b;
    else if (ctl[1]) y = a & b;
    else if (ctl[0]) y = a - b;
    else             y = a + b;
  end

endmodule
