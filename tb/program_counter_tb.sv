// program_counter_tb: checks that the PC resets to 0, increments when enabled without
// load, loads the jump address when enabled with load, holds when not enabled, and
// wraps from 255 to 0.
module program_counter_tb;
  import simple_cpu_pkg::*;

  logic  clk = 1'b0;
  logic  rst, en, ld;
  addr_t d, q;
  int    shadow;
  int checks = 0, failures = 0;

  program_counter dut (.clk(clk), .rst(rst), .en(en), .ld(ld), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic compare();
    checks++;
    if (int'(q) != shadow) begin
      failures++;
      $display("FAIL pc=%h expected %h", q, shadow);
    end
  endtask

  task automatic cycle(logic e, logic l, addr_t a);
    en = e; ld = l; d = a;
    @(posedge clk);
    if (e && l)  shadow = int'(a);
    else if (e)  shadow = (shadow + 1) % 256;
    #1 compare();
  endtask

  initial begin
    rst = 1'b1; en = 1'b1; ld = 1'b1; d = 8'h77;
    @(posedge clk); #1;
    rst = 1'b0; shadow = 0;
    compare();
    cycle(1'b1, 1'b1, 8'hFD);
    repeat (5) cycle(1'b1, 1'b0, 8'h00);   // wraps through 0
    repeat (300) cycle(1'($urandom), 1'($urandom % 4 == 0), addr_t'($urandom));
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
