// alu_tb: checks the four ALU functions (add, subtract, AND, pass B) selected by the
// ACC_CTL lines, on random operands and on the wrap-around corners, against
// arithmetic done in 32 bits and truncated to 8.
module alu_tb;
  import simple_cpu_pkg::*;

  logic [2:0] ctl;
  data_t      a, b, y;
  int checks = 0, failures = 0;

  alu dut (.ctl(ctl), .a(a), .b(b), .y(y));

  logic [2:0] ctls [4] = '{3'b000, 3'b001, 3'b010, 3'b100};

  function automatic data_t model(logic [2:0] c, data_t xa, data_t wb);
    int unsigned r, x, w;
    x = int'(xa);
    w = int'(wb);
    case (c)
      3'b000:  r = x + w;
      3'b001:  r = x + 256 - w;
      3'b010:  r = x & w;
      default: r = w;
    endcase
    return data_t'(r % 256);
  endfunction

  task automatic apply(logic [2:0] c, data_t x, data_t w);
    ctl = c; a = x; b = w;
    #1;
    checks++;
    if (y !== model(c, x, w)) begin
      failures++;
      $display("FAIL ctl=%b a=%h b=%h: y=%h expected %h", c, x, w, y, model(c, x, w));
    end
  endtask

  initial begin
    foreach (ctls[k]) begin
      apply(ctls[k], 8'hFF, 8'h01);
      apply(ctls[k], 8'h00, 8'h01);
      apply(ctls[k], 8'h80, 8'h80);
      repeat (200) apply(ctls[k], data_t'($urandom), data_t'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
