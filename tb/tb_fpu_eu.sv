// tb_fpu_eu: drives the execution unit directly. For each operation it checks the result
// against values computed in the testbench with real arithmetic (operands chosen so that the
// exact result is representable, or the truncated bits are known), the exception flags, and
// the cycle counts of Table 2: fpuBusy high for exactly N cycles, the commit at the edge that
// ends ExN, busy low in the following write cycle. It also checks that a blocked commit waits
// (NoWr) with busy held, and that a kill cancels the operation without a commit.
module tb_fpu_eu;
  import spur_fpu_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, start, accept, blk, kill, busy, active, stalled, rf_we, commit, commit_is_cmp, commit_cc;
  instr_t start_instr;
  seq_t start_seq, blk_seq, kill_seq, cur_seq;
  fpreg_t opa, opb, rf_wd;
  logic [4:0] rf_wa;
  logic [3:0] commit_flags;
  int checks = 0, failures = 0;

  fpu_eu dut (.*);

  // independent conversion between real and the register format (double precision)
  function automatic fpreg_t r2f(input real r, input dtype_e t = DT_DBL);
    logic [63:0] b;
    fpreg_t f;
    b = $realtobits(r);
    f = '0;
    f.sign = b[63];
    if (r == 0.0) begin
      f.dtype = DT_ZERO;
      return f;
    end
    f.exp   = 17'(65535 + int'(b[62:52]) - 1023);
    f.frac  = {1'b1, b[51:0], 11'd0};
    f.dtype = t;
    return f;
  endfunction

  function automatic real f2r(input fpreg_t f);
    logic [63:0] b;
    if (f.dtype == DT_ZERO) return 0.0;
    b = {f.sign, 11'(int'(f.exp) - 65535 + 1023), f.frac[62:11]};
    return $bitstoreal(b);
  endfunction

  task automatic chk(input logic [127:0] got, input logic [127:0] exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp_v);
    end
  endtask

  fpreg_t     got_res;
  logic [3:0] got_flags;
  logic       got_we, got_cc, got_cmp;
  int         busy_cycles, commit_cycle;

  // run one operation; returns when the unit is back in the write cycle
  task automatic run(input logic [6:0] op, input fpreg_t a, input fpreg_t b,
                     input logic [4:0] rd = 5'd3);
    int cyc;
    @(negedge clk);
    start = 1; start_instr = '{opcode: op, rs1: 5'd1, rs2: 5'd2, rd: rd};
    start_seq = start_seq + 1; opa = a; opb = b;
    @(negedge clk);
    start = 0;
    busy_cycles = 0; cyc = 0; commit_cycle = -1;
    got_we = 0;
    while (busy && cyc < 40) begin
      busy_cycles++;
      if (commit) begin
        commit_cycle = cyc;
        got_res = rf_wd; got_flags = commit_flags; got_we = rf_we;
        got_cc = commit_cc; got_cmp = commit_is_cmp;
      end
      @(negedge clk);
      cyc++;
    end
  endtask

  task automatic arith(input logic [6:0] op, input real a, input real b, input real expect_r,
                       input int cycles, input logic [3:0] flags_exp, input string what);
    run(op, r2f(a), r2f(b));
    chk(busy_cycles, cycles, {what, ": busy cycles"});
    chk(commit_cycle, cycles - 1, {what, ": commit at the end of ExN"});
    chk(got_we, 1, {what, ": register write"});
    checks++;
    if (f2r(got_res) != expect_r) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, f2r(got_res), expect_r);
    end
    chk(got_flags, flags_exp, {what, ": flags"});
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fpreg_t x, y, big;
    rst = 1; start = 0; blk = 0; kill = 0; blk_seq = 0; kill_seq = 0; start_seq = 0;
    start_instr = '0; opa = '0; opb = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    chk(busy, 0, "idle after reset");
    chk(accept, 1, "accepts after reset");

    arith(OP_FADD, 1.5, 2.25, 3.75, 3, 4'b0000, "FADD");
    arith(OP_FSUB, 1.5, 2.25, -0.75, 3, 4'b0000, "FSUB");
    arith(OP_FADD, 1.0e10, -1.0e10, 0.0, 3, 4'b0000, "FADD to zero");
    arith(OP_FMUL, 1.5, -2.5, -3.75, 8, 4'b0000, "FMUL");
    arith(OP_FDIV, 7.5, 2.5, 3.0, 20, 4'b0000, "FDIV");
    // 1/3 truncated to 53 bits is the same as the IEEE nearest value (next bit is 0)
    arith(OP_FDIV, 1.0, 3.0, 1.0 / 3.0, 20, 4'b1000, "FDIV inexact");
    // 1/10 truncated differs from the IEEE nearest value by one unit in the last place
    arith(OP_FDIV, 1.0, 10.0, $bitstoreal(64'h3FB9_9999_9999_9999), 20, 4'b1000,
          "FDIV truncates");
    arith(OP_FABS, -6.25, 0.0, 6.25, 3, 4'b0000, "FABS");
    arith(OP_FNEG, 6.25, 0.0, -6.25, 3, 4'b0000, "FNEG");
    arith(OP_CVTD, 0.1, 0.0, 0.1, 3, 4'b0000, "CVTD exact");

    // CVTS of 1/3 truncates to 24 bits: 0x3EAAAAAA as a single
    run(OP_CVTS, r2f(1.0 / 3.0), '0);
    chk(got_res.dtype, DT_SGL, "CVTS type");
    chk(got_res.frac, 64'hAAAA_AA00_0000_0000, "CVTS fraction");
    chk(got_flags, 4'b1000, "CVTS inexact");

    // FCMP: result in the compare bit, no register write
    run(OP_FCMP, r2f(1.0), r2f(2.0), {2'b00, CC_LT});
    chk({got_cmp, got_cc, got_we}, 3'b110, "FCMP 1<2 true, no write");
    chk(busy_cycles, CYC_FCMP, "FCMP cycles");
    run(OP_FCMP, r2f(-1.0), r2f(-2.0), {2'b00, CC_LT});
    chk(got_cc, 0, "FCMP -1<-2 false");
    run(OP_FCMP, r2f(0.0), r2f(-0.0), {2'b00, CC_EQ});
    chk(got_cc, 1, "FCMP 0==-0");

    // overflow: single 2^100 * 2^100 exceeds the single range
    x = r2f(2.0 ** 100, DT_SGL);
    run(OP_FMUL, x, x);
    chk(got_res.dtype, DT_INF, "overflow gives infinity");
    chk(got_flags, 4'b1010, "overflow flags");
    // underflow
    x = r2f(2.0 ** -100, DT_SGL);
    run(OP_FMUL, x, x);
    chk(got_res.dtype, DT_ZERO, "underflow gives zero");
    chk(got_flags, 4'b1100, "underflow flags");
    // operand trap: NaN operand, and divide by zero
    y = '0; y.dtype = DT_NAN;
    run(OP_FADD, r2f(1.0), y);
    chk(got_flags, 4'b0001, "NaN operand trap");
    chk(got_res.dtype, DT_NAN, "NaN result");
    run(OP_FDIV, r2f(1.0), r2f(0.0));
    chk(got_flags[EXC_OPERAND], 1, "divide by zero operand trap");
    // specifier 15 is not written by the unit
    run(OP_FADD, r2f(1.0), r2f(1.0), 5'd15);
    chk(got_we, 0, "no write to specifier 15");

    // blocked commit: held in ExN while blk names this operation
    @(negedge clk);
    start = 1; start_instr = '{opcode: OP_FADD, rs1: 1, rs2: 2, rd: 4}; start_seq = 6'd40;
    opa = r2f(1.0); opb = r2f(1.0);
    @(negedge clk); start = 0;
    blk = 1; blk_seq = 6'd40;
    repeat (6) @(negedge clk);
    chk({busy, stalled, commit}, 3'b110, "blocked: busy, stalled, no commit");
    blk_seq = 6'd41;   // block names another operation: commit goes ahead
    #1 chk(commit, 1, "commit once unblocked");
    @(negedge clk); blk = 0;
    chk(busy, 0, "write cycle after blocked commit");
    // kill in the middle of an FDIV
    @(negedge clk);
    start = 1; start_instr = '{opcode: OP_FDIV, rs1: 1, rs2: 2, rd: 4}; start_seq = 6'd50;
    @(negedge clk); start = 0;
    repeat (5) @(negedge clk);
    kill = 1; kill_seq = 6'd49;
    #1 chk(busy, 1, "kill of another tag leaves it running");
    kill_seq = 6'd50;
    @(negedge clk); kill = 0;
    chk(busy, 0, "killed operation stops");
    begin
      int commits = 0;
      repeat (25) begin
        @(negedge clk);
        if (commit) commits++;
      end
      chk(commits, 0, "no commit after kill");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
