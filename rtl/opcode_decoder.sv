// opcode_decoder: the one-hot decoder that turns the 4-bit opcode field of the
// instruction register (IR[15:12]) into sixteen select lines Y0..Y15.
//
// Exactly one output is high for any input. Y0..Y10 are the eleven instructions
// (MOVE, ADD, SUB, AND, LOAD, STORE, ADDM, SUBM, JUMPU, JUMPZ, JUMPNZ); Y11..Y15 are
// spare lines left for new instructions. Purely combinational.
//
// Ports: opcode (4 bits), y (16 bits, y[n] = 1 when opcode == n).
module opcode_decoder
  import simple_cpu_pkg::*;
(
  input  logic [OPCODE_W-1:0] opcode,
  output logic [NUM_OPS-1:0]  y
);

  always_comb begin
    y = '0;
    y[opcode] = 1'b1;
  end

endmodule
