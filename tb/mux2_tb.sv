// mux2_tb: checks the two-input multiplexer at the address-bus width with random
// inputs and both select values.
module mux2_tb;
  logic       sel;
  logic [7:0] a, b, y;
  int checks = 0, failures = 0;

  mux2 #(.WIDTH(8)) dut (.sel(sel), .a(a), .b(b), .y(y));

  initial begin
    repeat (200) begin
      a = 8'($urandom); b = 8'($urandom); sel = 1'($urandom);
      #1;
      checks++;
      if (y !== (sel ? b : a)) begin
        failures++;
        $display("FAIL sel=%b a=%h b=%h y=%h", sel, a, b, y);
      end
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
