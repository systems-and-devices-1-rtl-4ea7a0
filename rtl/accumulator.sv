// accumulator: the 8-bit ACC register and the zero flag Z used by the conditional
// jumps.
//
// ACC loads d on a rising clock edge when en (ACC_EN) is high. Z is ACC == 0, formed
// combinationally from the register, so it always describes the current ACC value;
// the design names Z = ZERO without saying whether it is stored, and a separate flag
// register would behave the same here because only ACC-writing instructions change it.
// Synchronous, active-high reset to zero is this implementation's choice.
//
// Ports: clk, rst, en, d (ALU result), q (ACC), z (ACC is zero).
module accumulator
  import simple_cpu_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  data_t d,
  output data_t q,
  output logic  z
);

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (en) q <= d;
  end

  assign z = (q == '0);

endmodule
