// decode_logic_tb: applies every phase, every one-hot opcode line and both values of
// the zero flag, and compares the whole control word with the instruction-level
// reference in ctl_model_pkg.
module decode_logic_tb;
  import simple_cpu_pkg::*;
  import ctl_model_pkg::*;

  phase_t             phase;
  logic [NUM_OPS-1:0] op;
  logic               z;
  ctl_t               ctl, exp_ctl;
  int checks = 0, failures = 0;

  decode_logic dut (.phase(phase), .op(op), .z(z), .ctl(ctl));

  initial begin
    for (int p = 0; p < 3; p++)
      for (int o = 0; o < NUM_OPS; o++)
        for (int zz = 0; zz < 2; zz++) begin
          phase = phase_t'(3'b001 << p);
          op    = NUM_OPS'(1) << o;
          z     = 1'(zz);
          #1;
          exp_ctl = expected_ctl(4'(o), p, 1'(zz));
          checks++;
          if (ctl !== exp_ctl) begin
            failures++;
            $display("FAIL phase=%0d op=%0d z=%0d: ctl=%b expected %b", p, o, zz, ctl, exp_ctl);
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
