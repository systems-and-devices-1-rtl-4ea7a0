// program_counter: the 8-bit PC.
//
// On a rising clock edge with en (PC_EN) high it either loads the jump address d
// (when ld, PC_LD, is high) or increments by one (when ld is low); with en low it
// holds. The control logic increments it in DECODE for every instruction that does
// not jump and loads it in EXECUTE for one that does. The count wraps from 255 to 0.
// Synchronous, active-high reset to address 0 is this implementation's choice.
//
// Ports: clk, rst, en, ld, d (IR[7:0]), q (PC).
module program_counter
  import simple_cpu_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  logic  ld,
  input  addr_t d,
  output addr_t q
);

  always_ff @(posedge clk) begin
    if (rst)          q <= '0;
    else if (en && ld) q <= d;
    else if (en)       q <= q + 1'b1;
  end

endmodule
