// instruction_register_tb: checks that IR clears on reset, loads a 16-bit word only
// when enabled, and splits it into the opcode IR[15:12] and operand IR[7:0].
module instruction_register_tb;
  import simple_cpu_pkg::*;

  logic                clk = 1'b0;
  logic                rst, en;
  word_t               d, q, shadow;
  logic [OPCODE_W-1:0] opcode;
  data_t               operand;
  int checks = 0, failures = 0;

  instruction_register dut (
    .clk(clk), .rst(rst), .en(en), .d(d), .q(q), .opcode(opcode), .operand(operand)
  );

  always #5 clk = ~clk;

  task automatic compare();
    checks++;
    if (q !== shadow || opcode !== shadow[15:12] || operand !== shadow[7:0]) begin
      failures++;
      $display("FAIL q=%h opcode=%h operand=%h expected %h", q, opcode, operand, shadow);
    end
  endtask

  initial begin
    rst = 1'b1; en = 1'b1; d = 16'hBEEF;
    @(posedge clk); #1;
    rst = 1'b0; shadow = 16'h0000;
    compare();
    repeat (300) begin
      en = 1'($urandom);
      d  = word_t'($urandom);
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
