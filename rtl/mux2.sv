// mux2: a two-input multiplexer of parameterised width.
//
// The processor uses two: the address multiplexer (ADDR_SEL) that drives the memory
// address from the PC (sel = 0) or from the IR operand (sel = 1), and the data
// multiplexer (DATA_SEL) that gives the ALU the immediate KK (sel = 0) or the memory
// data (sel = 1). Purely combinational.
//
// Ports: sel, a (chosen when sel = 0), b (chosen when sel = 1), y.
module mux2 #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);

  assign y = sel ? b : a;

endmodule
