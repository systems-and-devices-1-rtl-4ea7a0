// accumulator_tb: checks that ACC clears on reset, loads only when enabled, holds
// otherwise, and that the zero flag follows the stored value, against a shadow
// register kept by the testbench.
module accumulator_tb;
  import simple_cpu_pkg::*;

  logic  clk = 1'b0;
  logic  rst, en, z;
  data_t d, q, shadow;
  int checks = 0, failures = 0;

  accumulator dut (.clk(clk), .rst(rst), .en(en), .d(d), .q(q), .z(z));

  always #5 clk = ~clk;

  task automatic compare();
    checks++;
    if (q !== shadow || z !== (shadow == 8'h00)) begin
      failures++;
      $display("FAIL q=%h z=%b expected %h", q, z, shadow);
    end
  endtask

  initial begin
    rst = 1'b1; en = 1'b1; d = 8'h5A;
    @(posedge clk); #1;
    rst = 1'b0; shadow = 8'h00;
    compare();
    repeat (300) begin
      en = 1'($urandom);
      d  = ($urandom % 4 == 0) ? 8'h00 : data_t'($urandom);
      @(posedge clk);
      if (en) shadow = d;
      #1 compare();
    end
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
