// control_unit: the processor's control logic, built as the design describes it from
// three parts: a three-bit ring counter for the FETCH/DECODE/EXECUTE phase, a one-hot
// decoder for the opcode field IR[15:12], and the control-signal logic that combines
// the two with the zero flag.
//
// Every instruction takes three clock cycles. In FETCH the instruction at PC is read
// and loaded into IR; in DECODE the PC is incremented (unless the instruction jumps)
// and, for memory instructions, the address bus switches to the IR operand; in
// EXECUTE the accumulator is loaded, memory is written, or a jump loads the PC.
//
// Ports: clk, rst (synchronous, active high), opcode (IR[15:12]), z (ACC == 0),
// phase (current phase, for observation), ctl (control word, combinational).
module control_unit
  import simple_cpu_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic [OPCODE_W-1:0] opcode,
  input  logic                z,
  output phase_t              phase,
  output ctl_t                ctl
);

  logic [NUM_OPS-1:0] op;

  ring_counter u_ring (
    .clk   (clk),
    .rst   (rst),
    .phase (phase)
  );

  opcode_decoder u_dec (
    .opcode (opcode),
    .y      (op)
  );

  decode_logic u_logic (
    .phase (phase),
    .op    (op),
    .z     (z),
    .ctl   (ctl)
  );

endmodule
