// twotoone_mux_tb: random vectors through the 32-bit two-input multiplexer,
// checked against sel ? b : a.
module twotoone_mux_tb;
  logic [31:0] a, b, y;
  logic        sel;
  int checks = 0, failures = 0;

  twotoone_mux #(.WIDTH(32)) dut (.a(a), .b(b), .sel(sel), .y(y));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      a = $urandom; b = $urandom; sel = 1'($urandom);
      #1;
      checks++;
      if (y !== (sel ? b : a)) begin
        failures++;
        $display("FAIL sel=%0b a=%h b=%h y=%h", sel, a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
