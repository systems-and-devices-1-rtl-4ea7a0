// simple_cpu_tb: end-to-end test of the whole processor running tb/cpu_test.dat, a
// program that uses every instruction, takes and skips both conditional jumps, wraps
// the 8-bit arithmetic, reads a data word with a non-zero high byte and executes an
// instruction that an earlier STORE wrote (self-modifying code).
//
// An instruction-level reference model (cpu_ref_pkg) runs the same program. At the
// start of every FETCH the testbench compares PC, ACC and the fetched word with the
// model and checks that the previous instruction took exactly three cycles; in every
// EXECUTE it checks the memory write against the model's STORE, and it checks that no
// other cycle writes. Each mechanism above is counted; one that never happens is a
// failure.
module simple_cpu_tb;
  import simple_cpu_pkg::*;
  import cpu_ref_pkg::*;

  localparam int N_INSTR = 26;

  logic   clk = 1'b0;
  logic   rst;
  addr_t  pc, mem_addr;
  word_t  ir, mem_rdata, mem_wdata;
  data_t  acc;
  logic   z, mem_en, mem_wr;
  phase_t phase;

  int checks = 0, failures = 0;
  int cycles_since_fetch;
  int n_instr = 0;
  int op_count [11];
  int n_jz_taken = 0, n_jz_not = 0, n_jnz_taken = 0, n_jnz_not = 0;
  int n_wrap = 0, n_high_byte = 0, n_selfmod = 0;
  logic written [256];

  cpu_state_t m;
  word_t      image [256];
  step_info_t info;

  simple_cpu #(.INIT_FILE("tb/cpu_test.dat")) dut (
    .clk(clk), .rst(rst), .pc(pc), .ir(ir), .acc(acc), .z(z), .phase(phase),
    .mem_addr(mem_addr), .mem_en(mem_en), .mem_wr(mem_wr),
    .mem_rdata(mem_rdata), .mem_wdata(mem_wdata)
  );

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL instr %0d: %s (pc=%h acc=%h ir=%h)", n_instr, what, pc, acc, ir);
    end
  endtask

  initial begin
    foreach (image[i]) image[i] = '0;
    foreach (written[i]) written[i] = 1'b0;
    foreach (op_count[i]) op_count[i] = 0;
    $readmemh("tb/cpu_test.dat", image);
    foreach (image[i]) m.mem[i] = image[i];
    m.pc = '0; m.acc = '0;
    info = '{opcode: 4'd0, jumped: 1'b0, wrapped: 1'b0, high_byte: 1'b0,
             stored: 1'b0, st_addr: 8'h00, st_data: 16'h0000};

    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    cycles_since_fetch = 3;

    while (n_instr < N_INSTR) begin
      @(negedge clk);
      if (phase.fetch) begin
        check(cycles_since_fetch == 3, $sformatf("instruction took %0d cycles", cycles_since_fetch));
        cycles_since_fetch = 0;
        check(pc == m.pc, $sformatf("PC expected %h", m.pc));
        check(acc == m.acc, $sformatf("ACC expected %h", m.acc));
        check(z == (m.acc == 8'h00), "zero flag");
        check(mem_en && mem_addr == pc && mem_rdata == m.mem[m.pc],
              $sformatf("fetch bus: addr %h data %h, expected %h", mem_addr, mem_rdata, m.mem[m.pc]));
        if (written[m.pc]) n_selfmod++;
        info = step(m);
        if (info.opcode <= 4'd10) op_count[info.opcode]++;
        if (info.opcode == 4'd9)  begin if (info.jumped) n_jz_taken++;  else n_jz_not++;  end
        if (info.opcode == 4'd10) begin if (info.jumped) n_jnz_taken++; else n_jnz_not++; end
        if (info.wrapped)   n_wrap++;
        if (info.high_byte) n_high_byte++;
        if (info.stored) written[info.st_addr] = 1'b1;
        n_instr++;
      end
      if (phase.execute) begin
        check(mem_wr == info.stored, "memory write enable in EXECUTE");
        if (info.stored)
          check(mem_en && mem_addr == info.st_addr && mem_wdata == info.st_data,
                $sformatf("store of %h to %h, expected %h to %h",
                          mem_wdata, mem_addr, info.st_data, info.st_addr));
      end else begin
        check(!mem_wr, "memory written outside EXECUTE");
      end
      @(posedge clk);
      cycles_since_fetch++;
    end

    check(m.pc == 8'h13, "program reached its final loop");
    foreach (op_count[i])
      if (op_count[i] == 0) begin
        failures++;
        $display("FAIL opcode %0d never executed", i);
      end
    if (n_jz_taken == 0 || n_jz_not == 0 || n_jnz_taken == 0 || n_jnz_not == 0) begin
      failures++;
      $display("FAIL a conditional-jump outcome never happened");
    end
    if (n_wrap == 0)      begin failures++; $display("FAIL no arithmetic wrap-around"); end
    if (n_high_byte == 0) begin failures++; $display("FAIL no data word with a high byte"); end
    if (n_selfmod == 0)   begin failures++; $display("FAIL no rewritten instruction executed"); end
    $display("instructions=%0d jumpz taken/not=%0d/%0d jumpnz taken/not=%0d/%0d wraps=%0d high-byte reads=%0d rewritten instructions run=%0d",
             n_instr, n_jz_taken, n_jz_not, n_jnz_taken, n_jnz_not, n_wrap, n_high_byte, n_selfmod);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
