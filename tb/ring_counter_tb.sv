// ring_counter_tb: checks that the ring counter enters FETCH on reset and then steps
// FETCH -> DECODE -> EXECUTE -> FETCH on every clock, against a phase count kept by
// the testbench, including a reset applied in the middle of an instruction.
module ring_counter_tb;
  import simple_cpu_pkg::*;

  logic   clk = 1'b0;
  logic   rst;
  phase_t phase;
  int     checks = 0, failures = 0;
  int     step;

  ring_counter dut (.clk(clk), .rst(rst), .phase(phase));

  always #5 clk = ~clk;

  function automatic logic [2:0] expected(int s);
    case (s % 3)
      0:       return 3'b001;
      1:       return 3'b010;
      default: return 3'b100;
    endcase
  endfunction

  task automatic check_phase(int s);
    checks++;
    if (phase !== phase_t'(expected(s))) begin
      failures++;
      $display("FAIL step %0d: phase %b, expected %b", s, phase, expected(s));
    end
  endtask

  initial begin
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    step = 0;
    check_phase(step);
    repeat (20) begin
      @(posedge clk); #1;
      step++;
      check_phase(step);
    end
    // Reset in the DECODE phase goes straight back to FETCH.
    while (!phase.decode) @(posedge clk);
    #1 rst = 1'b1;
    @(posedge clk); #1 rst = 1'b0;
    step = 0;
    check_phase(step);
    repeat (7) begin
      @(posedge clk); #1;
      step++;
      check_phase(step);
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
