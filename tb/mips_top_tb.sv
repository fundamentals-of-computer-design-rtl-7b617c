// mips_top_tb: end-to-end test of both processors in the top level.
// Instance u_ref runs the reference programs (beq not taken); instance u_alt
// runs the single-cycle beq-taken program and a pipeline program whose beq
// is taken. Every cycle is checked against expected values, and each
// mechanism of the design is counted; a mechanism that never occurs counts
// as a failure:
//   single-cycle: branch not taken, branch taken, store seen on dataMemOut
//   pipeline:     register write-back, overlap (fetch and write-back of
//                 different instructions in one cycle), stale operand read
//                 (no forwarding), branch not taken, branch taken in MEM
//                 with its three following instructions still completing,
//                 store seen on dataMemOut
module mips_top_tb;
  logic clk = 0, rst;
  int checks = 0, failures = 0;
  int cyc = 0;

  typedef struct packed {
    logic [31:0] sc_alu; logic sc_zero; logic [31:0] sc_rd1, sc_rd2, sc_dmem;
    logic [31:0] pl_alu; logic pl_zero; logic [31:0] pl_rd1, pl_rd2, pl_dmem, pl_if;
    logic [4:0]  pl_wr;  logic [31:0] pl_wbd;
  } obs_t;
  obs_t r, a;

  mips_top u_ref (.clk(clk), .rst(rst),
    .sc_aluResult(r.sc_alu), .sc_zero(r.sc_zero), .sc_readData1(r.sc_rd1), .sc_readData2(r.sc_rd2),
    .sc_dataMemOut(r.sc_dmem), .pl_aluResult(r.pl_alu), .pl_zero(r.pl_zero), .pl_readData1(r.pl_rd1),
    .pl_readData2(r.pl_rd2), .pl_dataMemOut(r.pl_dmem), .pl_instructionIF_out(r.pl_if),
    .pl_writeRegister_out(r.pl_wr), .pl_writebackData_out(r.pl_wbd));
  mips_top #(.SC_PROGRAM("rtl/prog_single_cycle_beq_taken.hex"), .PL_PROGRAM("tb/prog_pipe_branch.hex")) u_alt (
    .clk(clk), .rst(rst),
    .sc_aluResult(a.sc_alu), .sc_zero(a.sc_zero), .sc_readData1(a.sc_rd1), .sc_readData2(a.sc_rd2),
    .sc_dataMemOut(a.sc_dmem), .pl_aluResult(a.pl_alu), .pl_zero(a.pl_zero), .pl_readData1(a.pl_rd1),
    .pl_readData2(a.pl_rd2), .pl_dataMemOut(a.pl_dmem), .pl_instructionIF_out(a.pl_if),
    .pl_writeRegister_out(a.pl_wr), .pl_writebackData_out(a.pl_wbd));

  always #10 clk = ~clk;

  int n_sc_bnt, n_sc_bt, n_sc_store, n_pl_wb, n_pl_overlap, n_pl_stale, n_pl_bnt, n_pl_bt, n_pl_store;

  task automatic expect32(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL cycle %0d %s: got %h expected %h", cyc, what, got, exp);
    end
  endtask

  task automatic need(input string what, input int n);
    checks++;
    $display("mechanism %-28s occurred %0d time(s)", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism %s never occurred", what);
    end
  endtask

  initial begin
    repeat (300) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] sc_ref [7] = '{32'h112, 32'hA, 32'hF, 32'h108, 32'h11C, 32'h6E, 32'h11E};
  logic [31:0] sc_alt [5] = '{32'h112, 32'h112, 32'hF, 32'h0, 32'h0};
  logic [36:0] wb_ref [11] = '{{5'd9, 32'h112}, {5'd10, 32'hA}, {5'd11, 32'hF}, 0, 0, 0,
                               {5'd10, 32'h108}, {5'd9, 32'h11C}, {5'd11, 32'h6E}, {5'd9, 32'h11A}, 0};
  logic [36:0] wb_alt [11] = '{{5'd9, 32'h1}, {5'd10, 32'h1}, 0, 0, 0, {5'd10, 32'h0},
                               {5'd11, 32'h11}, {5'd12, 32'h22}, {5'd13, 32'h33}, {5'd16, 32'h66}, 0};

  initial begin
    {n_sc_bnt, n_sc_bt, n_sc_store, n_pl_wb, n_pl_overlap, n_pl_stale, n_pl_bnt, n_pl_bt, n_pl_store} = '0;
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (cyc = 1; cyc <= 16; cyc++) begin
      @(negedge clk);
      // ---- single-cycle core (cycle c executes word c-1) ----
      if (cyc <= 7) expect32("sc ref aluResult", r.sc_alu, sc_ref[cyc-1]);
      if (cyc <= 5) expect32("sc alt aluResult", a.sc_alu, sc_alt[cyc-1]);
      if (cyc == 4) begin
        expect32("sc ref beq zero", 32'(r.sc_zero), 0);
        expect32("sc alt beq zero", 32'(a.sc_zero), 1);
        if (!r.sc_zero) n_sc_bnt++;
      end
      if (cyc == 5 && a.sc_alu == 32'h0 && a.sc_rd1 == 32'h0) n_sc_bt++;   // no-op at the target, not add
      if (cyc == 7) begin
        expect32("sc ref dataMemOut after sw", r.sc_dmem, 32'hF);
        if (r.sc_dmem == 32'hF) n_sc_store++;
      end
      // ---- pipeline (W holds word c-5) ----
      if (cyc >= 5 && cyc <= 15) begin
        expect32("pl ref W", 32'({r.pl_wr, r.pl_wbd} == wb_ref[cyc-5]), 1);
        expect32("pl alt W", 32'({a.pl_wr, a.pl_wbd} == wb_alt[cyc-5]), 1);
        if (r.pl_wr != 0 && {r.pl_wr, r.pl_wbd} == wb_ref[cyc-5]) n_pl_wb++;
        if (r.pl_wr != 0 && r.pl_if != 0) n_pl_overlap++;
      end
      if (cyc == 9) begin
        expect32("pl ref beq zero", 32'(r.pl_zero), 0);
        if (!r.pl_zero && r.pl_alu == 32'h108) n_pl_bnt++;
      end
      if (cyc == 11) begin
        expect32("pl ref or reads old $t1", r.pl_rd1, 32'h112);
        if (r.pl_rd1 == 32'h112) n_pl_stale++;
      end
      if (cyc == 13) begin
        expect32("pl ref dataMemOut after sw", r.pl_dmem, 32'hF);
        if (r.pl_dmem == 32'hF) n_pl_store++;
      end
      if (cyc == 10) begin
        expect32("pl alt fetch at branch target", a.pl_if, 32'h20100066);
        if (a.pl_if == 32'h20100066) n_pl_bt++;
      end
    end
    need("sc branch not taken", n_sc_bnt);
    need("sc branch taken", n_sc_bt);
    need("sc store", n_sc_store);
    need("pl register write-back", n_pl_wb);
    need("pl stage overlap", n_pl_overlap);
    need("pl stale read, no forwarding", n_pl_stale);
    need("pl branch not taken", n_pl_bnt);
    need("pl branch taken in MEM", n_pl_bt);
    need("pl store", n_pl_store);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
