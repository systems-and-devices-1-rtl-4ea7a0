// control_unit_tb: runs the control unit through many three-cycle instructions with a
// random opcode and zero flag for each, and checks the phase sequence and the control
// word in every cycle against the instruction-level reference in ctl_model_pkg.
module control_unit_tb;
  import simple_cpu_pkg::*;
  import ctl_model_pkg::*;

  logic                clk = 1'b0;
  logic                rst;
  logic [OPCODE_W-1:0] opcode;
  logic                z;
  phase_t              phase;
  ctl_t                ctl;
  int checks = 0, failures = 0;

  control_unit dut (
    .clk(clk), .rst(rst), .opcode(opcode), .z(z), .phase(phase), .ctl(ctl)
  );

  always #5 clk = ~clk;

  initial begin
    rst = 1'b1; opcode = '0; z = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    repeat (200) begin
      opcode = OPCODE_W'($urandom % 12);
      z      = 1'($urandom);
      for (int p = 0; p < 3; p++) begin
        #1;
        checks++;
        if (phase !== phase_t'(3'b001 << p) || ctl !== expected_ctl(opcode, p, z)) begin
          failures++;
          $display("FAIL op=%0d z=%b phase=%b(exp %0d) ctl=%b expected %b",
                   opcode, z, phase, p, ctl, expected_ctl(opcode, p, z));
        end
        @(posedge clk);
      end
    end
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
