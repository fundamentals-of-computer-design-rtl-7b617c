// memory_tb: random writes and reads of the 256-word data memory, checked
// against a model. The default instance has a registered read address, so a
// read returns the word addressed at the previous edge (including a word
// written at that edge); a second instance with READ_REG = 0 reads
// combinationally.
module memory_tb;
  logic        clk = 0, wren;
  logic [7:0]  addr, addr_prev;
  logic [31:0] data_in, data_out, data_out_async;
  logic [31:0] model [256];
  int checks = 0, failures = 0;

  memory dut (.clk(clk), .addr(addr), .data_in(data_in), .wren(wren), .data_out(data_out));
  memory #(.ADDR_BITS(8), .READ_REG(1'b0)) dut_async (
    .clk(clk), .addr(addr), .data_in(data_in), .wren(wren), .data_out(data_out_async));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = '0;
    wren = 0; addr = 8'h6E; data_in = '0;
    @(posedge clk); #1;
    // store 0xF to word 0x6E: data_out shows it in the next cycle
    wren = 1; data_in = 32'hF;
    #1;
    checks++;
    if (data_out_async !== 32'h0) begin failures++; $display("FAIL async before write"); end
    @(posedge clk); #1;
    model[8'h6E] = 32'hF;
    wren = 0; addr = 8'h1E;
    #1;
    checks++;
    if (data_out !== 32'hF) begin failures++; $display("FAIL sw next cycle: %h", data_out); end
    addr_prev = 8'h1E;
    for (int i = 0; i < 1000; i++) begin
      @(posedge clk); #1;
      checks++;
      if (data_out !== model[addr_prev]) begin
        failures++;
        $display("FAIL registered read a=%h got=%h exp=%h", addr_prev, data_out, model[addr_prev]);
      end
      addr = 8'($urandom_range(0, 31)); wren = 1'($urandom); data_in = $urandom;
      #1;
      checks++;
      if (addr != addr_prev && data_out !== model[addr_prev]) begin
        failures++;
        $display("FAIL read followed addr within the cycle: a=%h got=%h", addr, data_out);
      end
      checks++;
      if (data_out_async !== model[addr]) begin
        failures++;
        $display("FAIL async read a=%h got=%h exp=%h", addr, data_out_async, model[addr]);
      end
      if (wren) model[addr] = data_in;
      addr_prev = addr;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
