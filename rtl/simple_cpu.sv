// simple_cpu: a complete 8-bit accumulator computer (SimpleCPU_v1a).
//
// The datapath has an 8-bit accumulator (ACC) with a zero flag, an 8-bit ALU, an 8-bit
// program counter (PC), a 16-bit instruction register (IR) and one 256 x 16-bit memory
// for both program and data. Two multiplexers steer it: ADDR_SEL puts the PC or the IR
// operand on the memory address, DATA_SEL gives the ALU the immediate constant or the
// memory data. The control unit (ring counter, one-hot opcode decoder and control
// logic) runs every instruction in three cycles, FETCH, DECODE and EXECUTE, and raises
// the control lines listed in decode_logic. Data is 8 bits in 16-bit words: loads and
// arithmetic use the low byte of a word, and a store writes ACC zero-extended.
//
// The memory is initialised from INIT_FILE; the default is the MULx3 example program.
// Reset (synchronous, active high) clears PC, IR and ACC and enters FETCH, so the
// program starts at address 0 on the first cycle after reset is released.
//
// Ports: clk, rst; the remaining outputs let the state be observed: pc, ir, acc, z,
// phase, and the memory bus (mem_addr, mem_en, mem_wr, mem_rdata, mem_wdata).
module simple_cpu
  import simple_cpu_pkg::*;
#(
  parameter string INIT_FILE = "rtl/code.dat"
) (
  input  logic   clk,
  input  logic   rst,
  output addr_t  pc,
  output word_t  ir,
  output data_t  acc,
  output logic   z,
  output phase_t phase,
  output addr_t  mem_addr,
  output logic   mem_en,
  output logic   mem_wr,
  output word_t  mem_rdata,
  output word_t  mem_wdata
);

  ctl_t                ctl;
  logic [OPCODE_W-1:0] opcode;
  data_t               operand;
  data_t               alu_b;
  data_t               alu_y;

  control_unit u_ctl (
    .clk    (clk),
    .rst    (rst),
    .opcode (opcode),
    .z      (z),
    .phase  (phase),
    .ctl    (ctl)
  );

  program_counter u_pc (
    .clk (clk),
    .rst (rst),
    .en  (ctl.pc_en),
    .ld  (ctl.pc_ld),
    .d   (operand),
    .q   (pc)
  );

  instruction_register u_ir (
    .clk     (clk),
    .rst     (rst),
    .en      (ctl.ir_en),
    .d       (mem_rdata),
    .q       (ir),
    .opcode  (opcode),
    .operand (operand)
  );

  mux2 #(.WIDTH(ADDR_W)) u_addr_mux (
    .sel (ctl.addr_sel),
    .a   (pc),
    .b   (operand),
    .y   (mem_addr)
  );

  mux2 #(.WIDTH(DATA_W)) u_data_mux (
    .sel (ctl.data_sel),
    .a   (operand),
    .b   (mem_rdata[DATA_W-1:0]),
    .y   (alu_b)
  );

  alu u_alu (
    .ctl (ctl.acc_ctl),
    .a   (acc),
    .b   (alu_b),
    .y   (alu_y)
  );

  accumulator u_acc (
    .clk (clk),
    .rst (rst),
    .en  (ctl.acc_en),
    .d   (alu_y),
    .q   (acc),
    .z   (z)
  );

  assign mem_en    = ctl.rom_en | ctl.ram_en;
  assign mem_wr    = ctl.ram_wr;
  assign mem_wdata = word_t'(acc);

  memory #(
    .DEPTH     (1 << ADDR_W),
    .INIT_FILE (INIT_FILE)
  ) u_mem (
    .clk   (clk),
    .en    (mem_en),
    .wr    (mem_wr),
    .addr  (mem_addr),
    .wdata (mem_wdata),
    .rdata (mem_rdata)
  );

  // Bus rules: memory is written only in EXECUTE, and always at the IR operand address.
  a_write_in_execute: assert property (@(posedge clk) disable iff (rst)
      mem_wr |-> (phase.execute && ctl.addr_sel && mem_en))
    else $error("simple_cpu: memory write outside EXECUTE or not at the operand address");

endmodule
