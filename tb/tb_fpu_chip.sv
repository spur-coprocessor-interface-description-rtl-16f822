// tb_fpu_chip: drives the FPU chip through its pins only (instruction broadcast, fpuSuspend,
// the three cache controller pulses and the data bus) and checks whole instructions:
// double loads and stores round trip; FADD, FMUL, FDIV results read back by a store; fpuBusy
// length per Table 2; a load overlapping an arithmetic operation; FCMP driving fpuBrT_F; a
// division by zero raising fpuExcept and the Fpsw being rewritten through specifier 15; a
// write held back (NoWr) while a suspension lasts; and TRAP_CALL cancelling an operation.
module tb_fpu_chip;
  import spur_fpu_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, fpu_new_instr, fpu_suspend, fpu_busy, fpu_except, fpu_brtf;
  logic [6:0] fpu_opcode;
  logic [4:0] fpu_rs1, fpu_rs2, fpu_rd;
  logic data_may_be_valid, proc_tag_match, data_is_valid, st_data_oe;
  logic [63:0] ld_data, st_data;
  int checks = 0, failures = 0;

  fpu_chip dut (.*);

  task automatic chk(input logic [63:0] got, input logic [63:0] exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s: got %h expected %h (t=%0t)", what, got, exp_v, $time);
    end
  endtask

  // one cycle with an optional broadcast, suspend and data
  task automatic cyc(input logic ni = 0, input logic [6:0] op = 7'h01, input int rd = 0,
                     input int rs1 = 0, input int rs2 = 0, input logic su = 0,
                     input logic dv = 0, input logic [63:0] d = '0);
    @(negedge clk);
    fpu_new_instr = ni; fpu_opcode = op; fpu_rd = 5'(rd); fpu_rs1 = 5'(rs1); fpu_rs2 = 5'(rs2);
    fpu_suspend = su; data_is_valid = dv; ld_data = d;
    #1;
  endtask

  task automatic load_dbl(input int rd, input real v);
    cyc(1, OP_LD_DBL, rd);
    cyc();                                        // Exec
    cyc(0, 7'h01, 0, 0, 0, 0, 1, $realtobits(v)); // Mem
    cyc();                                        // Wr
  endtask

  task automatic store_dbl(input int rs, output real v);
    cyc(1, OP_ST_DBL, 0, 0, rs);
    cyc();                                        // Exec
    cyc(0, 7'h01, 0, 0, 0, 0, 1);                 // Mem
    checks++;
    if (!st_data_oe) begin failures++; $display("FAIL store not driven"); end
    v = $bitstoreal(st_data);
  endtask

  task automatic wait_idle();
    int n = 0;
    do begin cyc(); n++; end while (fpu_busy && n < 40);
  endtask

  task automatic chk_reg(input int r, input real exp_v, input string what);
    real v;
    store_dbl(r, v);
    chk($realtobits(v), $realtobits(exp_v), what);
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    real v;
    rst = 1; fpu_new_instr = 0; fpu_opcode = 0; fpu_rs1 = 0; fpu_rs2 = 0; fpu_rd = 0;
    fpu_suspend = 0; data_may_be_valid = 0; proc_tag_match = 0; data_is_valid = 0; ld_data = 0;
    repeat (2) @(negedge clk);
    rst = 0;

    load_dbl(1, 1.5);
    load_dbl(2, 2.25);
    chk_reg(1, 1.5, "load/store round trip R1");
    chk_reg(2, 2.25, "load/store round trip R2");

    // FADD: busy for 3 cycles
    cyc(1, OP_FADD, 3, 1, 2);
    n = 0;
    cyc();
    while (fpu_busy) begin n++; cyc(); end
    chk(n, CYC_FADD, "FADD fpuBusy cycles");
    cyc();
    chk_reg(3, 3.75, "FADD result");

    // FMUL with a load overlapping it
    cyc(1, OP_FMUL, 4, 1, 2);
    load_dbl(5, -8.0);
    n = 3;
    while (fpu_busy) begin n++; cyc(); end
    chk(n, CYC_FMUL, "FMUL fpuBusy cycles with an overlapping load");
    cyc();
    chk_reg(4, 3.375, "FMUL result");
    chk_reg(5, -8.0, "overlapped load result");

    // FDIV
    cyc(1, OP_FDIV, 6, 5, 2);
    wait_idle(); cyc();
    chk_reg(6, -8.0 / 2.25, "FDIV result (truncated)");

    // FCMP: cc to fpuBrT_F (condition in the Rd field: 2 = less than)
    cyc(1, OP_FCMP, CC_LT, 5, 1);
    wait_idle();
    chk(fpu_brtf, 1, "FCMP -8 < 1.5 sets fpuBrT_F");
    cyc(1, OP_FCMP, CC_LT, 1, 5);
    wait_idle();
    chk(fpu_brtf, 0, "FCMP 1.5 < -8 clears fpuBrT_F");

    // division by zero: operand exception, cleared by rewriting the Fpsw
    load_dbl(7, 0.0);
    chk(fpu_except, 0, "no exception yet");
    cyc(1, OP_FDIV, 8, 1, 7);
    wait_idle();
    chk(fpu_except, 1, "division by zero raises fpuExcept");
    cyc(1, OP_LD_DBL, FPSW_SPEC);
    cyc();
    cyc(0, 7'h01, 0, 0, 0, 0, 1, 64'h70);
    cyc(); cyc();
    chk(fpu_except, 0, "Fpsw rewritten through specifier 15");

    // NoWr: operation received, then suspension: its write waits for the suspension end
    cyc(1, OP_FADD, 9, 1, 1);                  // 1.5 + 1.5
    cyc(0, 7'h01, 0, 0, 0, 1);
    n = 0;
    repeat (5) begin cyc(0, 7'h01, 0, 0, 0, 1); n += int'(fpu_busy); end
    chk(n, 5, "fpuBusy held while the write is blocked");
    cyc();
    wait_idle(); cyc();
    chk_reg(9, 3.0, "blocked operation writes after the suspension");

    // TRAP_CALL cancels the last received FPU operation
    cyc(1, OP_FADD, 9, 2, 2);                  // would write 4.5
    cyc(1, OP_TRAP_CALL);
    cyc();
    chk(fpu_busy, 0, "cancelled operation frees the unit");
    chk_reg(9, 3.0, "cancelled operation wrote nothing");

    // load data only through the composite dataValid: mayBeValid without tag match is ignored
    cyc(1, OP_LD_DBL, 10);
    cyc();
    @(negedge clk); fpu_new_instr = 0; data_may_be_valid = 1; proc_tag_match = 0;
    ld_data = $realtobits(9.0);
    @(negedge clk); proc_tag_match = 1; ld_data = $realtobits(10.0);
    @(negedge clk); data_may_be_valid = 0; proc_tag_match = 0;
    cyc();
    chk_reg(10, 10.0, "load waits for dataMayBeValid with procTagMatch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
