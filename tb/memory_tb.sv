// memory_tb: checks the 256 x 16 memory: contents start at zero, a write happens only
// when enable and write are both high, reads are combinational and give zero while
// disabled. A shadow array kept by the testbench is the reference.
module memory_tb;
  import simple_cpu_pkg::*;

  logic  clk = 1'b0;
  logic  en, wr;
  addr_t addr;
  word_t wdata, rdata;
  word_t shadow [256];
  int checks = 0, failures = 0;

  memory #(.DEPTH(256)) dut (
    .clk(clk), .en(en), .wr(wr), .addr(addr), .wdata(wdata), .rdata(rdata)
  );

  always #5 clk = ~clk;

  task automatic read_check(addr_t a);
    en = 1'b1; wr = 1'b0; addr = a;
    #1;
    checks++;
    if (rdata !== shadow[a]) begin
      failures++;
      $display("FAIL read %h: %h expected %h", a, rdata, shadow[a]);
    end
  endtask

  initial begin
    foreach (shadow[i]) shadow[i] = '0;
    en = 1'b0; wr = 1'b0; addr = '0; wdata = '0;
    @(negedge clk);
    for (int i = 0; i < 256; i += 17) read_check(addr_t'(i));
    repeat (400) begin
      @(negedge clk);
      en    = 1'($urandom);
      wr    = 1'($urandom);
      addr  = addr_t'($urandom % 32);
      wdata = word_t'($urandom);
      #1;
      checks++;
      if (rdata !== (en ? shadow[addr] : 16'h0000)) begin
        failures++;
        $display("FAIL read en=%b addr=%h: %h", en, addr, rdata);
      end
      @(posedge clk);
      if (en && wr) shadow[addr] = wdata;
    end
    @(negedge clk);
    for (int i = 0; i < 32; i++) read_check(addr_t'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
