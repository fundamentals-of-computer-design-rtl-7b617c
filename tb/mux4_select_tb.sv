// mux4_select_tb: exhaustive check of the PC-source select (Branch and zero).
module mux4_select_tb;
  logic Branch, zero, PCSrc;
  int checks = 0, failures = 0;

  mux4_select dut (.Branch(Branch), .zero(zero), .PCSrc(PCSrc));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {Branch, zero} = 2'(i);
      #1;
      checks++;
      if (PCSrc !== (i == 3)) begin
        failures++;
        $display("FAIL Branch=%0b zero=%0b PCSrc=%0b", Branch, zero, PCSrc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
