// opcode_decoder_tb: applies all sixteen opcodes and checks that exactly the matching
// output line is high, comparing with a constant built by shifting a one.
module opcode_decoder_tb;
  import simple_cpu_pkg::*;

  logic [OPCODE_W-1:0] opcode;
  logic [NUM_OPS-1:0]  y;
  int checks = 0, failures = 0;

  opcode_decoder dut (.opcode(opcode), .y(y));

  initial begin
    for (int i = 0; i < NUM_OPS; i++) begin
      opcode = OPCODE_W'(i);
      #1;
      checks++;
      if (y !== (16'h0001 << i)) begin
        failures++;
        $display("FAIL opcode %0d: y=%h", i, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
