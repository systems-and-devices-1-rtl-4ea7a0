// simple_cpu_mulx3_tb: runs the processor exactly as built, with its default memory
// image (rtl/code.dat, the MULx3 program), from reset until it reaches its final
// self-loop at address 0x0C.
//
// MULx3 computes 10 x 3 by repeated addition, keeping the product in word 0x0D and the
// loop count in word 0x0E. The testbench watches the memory bus and checks the
// sequence of values stored (product 0, count 3, then per pass count-1 and
// product+10), the final product 0x1E written to 0x0D, and the timing:
// 4 set-up instructions, 3 passes of 8 instructions and the final taken JUMPZ are 29
// instructions, so the halt loop is first fetched 29 x 3 = 87 cycles after reset.
module simple_cpu_mulx3_tb;
  import simple_cpu_pkg::*;

  logic   clk = 1'b0;
  logic   rst;
  addr_t  pc, mem_addr;
  word_t  ir, mem_rdata, mem_wdata;
  data_t  acc;
  logic   z, mem_en, mem_wr;
  phase_t phase;

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_store = 0;
  int halt_cycle = -1;
  logic [7:0]  exp_addr [12] = '{8'h0D, 8'h0E, 8'h0E, 8'h0D, 8'h0E, 8'h0D, 8'h0E, 8'h0D,
                                 8'h00, 8'h00, 8'h00, 8'h00};
  logic [15:0] exp_data [12] = '{16'h0000, 16'h0003, 16'h0002, 16'h000A, 16'h0001, 16'h0014,
                                 16'h0000, 16'h001E, 16'h0000, 16'h0000, 16'h0000, 16'h0000};

  simple_cpu dut (
    .clk(clk), .rst(rst), .pc(pc), .ir(ir), .acc(acc), .z(z), .phase(phase),
    .mem_addr(mem_addr), .mem_en(mem_en), .mem_wr(mem_wr),
    .mem_rdata(mem_rdata), .mem_wdata(mem_wdata)
  );

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    while (halt_cycle < 0 || cycle < halt_cycle + 12) begin
      @(negedge clk);
      if (mem_wr) begin
        if (n_store < 8)
          check(mem_addr == exp_addr[n_store] && mem_wdata == exp_data[n_store],
                $sformatf("store %0d: %h to %h, expected %h to %h", n_store, mem_wdata,
                          mem_addr, exp_data[n_store], exp_addr[n_store]));
        n_store++;
      end
      if (phase.fetch && pc == 8'h0C && halt_cycle < 0) halt_cycle = cycle;
      if (halt_cycle >= 0 && phase.fetch)
        check(pc == 8'h0C, "left the halt loop");
      @(posedge clk);
      cycle++;
    end
    check(halt_cycle == 87, $sformatf("halt loop reached at cycle %0d, expected 87", halt_cycle));
    check(n_store == 8, $sformatf("%0d stores, expected 8", n_store));
    check(acc == 8'h00 && z, "ACC holds the exhausted count 0");
    $display("MULx3: %0d stores, halt reached after %0d cycles", n_store, halt_cycle);
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
