// memory: the processor's single 256 x 16-bit, word-addressed memory, holding the
// program and its data in one array, so a program can overwrite its own instructions.
//
// Every location is one 16-bit word: an instruction, or a variable in its low byte.
// Reads are combinational: rdata shows the word at addr while en is high and zero
// otherwise. A write happens on the rising clock edge when en and wr are both high.
// The processor drives en with ROM_EN | RAM_EN, wr with RAM_WR, and writes the
// accumulator zero-extended to 16 bits. A combinational read lets the IR load in the
// same cycle as FETCH presents PC, and the accumulator in the cycle EXECUTE presents
// the data address; this timing and the zero-extension are this implementation's
// choices. The contents start at zero and are then loaded from INIT_FILE (one hex word
// per line, $readmemh format) when INIT_FILE is not empty, as an FPGA block RAM is
// initialised at configuration.
//
// Ports: clk, en, wr, addr, wdata, rdata.
module memory
  import simple_cpu_pkg::*;
#(
  parameter int unsigned DEPTH     = 256,
  parameter string       INIT_FILE = ""
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     wr,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  word_t                    wdata,
  output word_t                    rdata
);

  word_t mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (en && wr) mem[addr] <= wdata;
  end

  assign rdata = en ? mem[addr] : '0;

endmodule
