// instruction_register: the 16-bit IR that holds the instruction being executed.
//
// It loads the memory word on the rising clock edge that ends the FETCH phase
// (en = IR_EN = FETCH) and holds it through DECODE and EXECUTE. Its fields are the
// opcode IR[15:12], feeding the one-hot decoder, and the operand IR[7:0], used as the
// immediate constant KK or as the address AA; IR[11:8] is unused. Synchronous,
// active-high reset to zero is this implementation's choice.
//
// Ports: clk, rst, en, d (memory read data), q (instruction), opcode, operand.
module instruction_register
  import simple_cpu_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  word_t               d,
  output word_t               q,
  output logic [OPCODE_W-1:0] opcode,
  output data_t               operand
);

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (en) q <= d;
  end

  assign opcode  = q[INSTR_W-1 -: OPCODE_W];
  assign operand = q[DATA_W-1:0];

endmodule
