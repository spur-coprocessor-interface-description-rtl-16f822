// tb_cpu_fpu_if: checks the CPU side of the coprocessor interface against a small behavioural
// model of the FPU's fpuBusy behaviour (one operation at a time, three busy cycles and a write
// cycle, a one-entry buffer, parking of an instruction latched during a suspension).
// Covered: broadcast of every issued instruction, the Upsw bits (emulation trap without an
// FPU, sequential mode), the fpuBusy interlock, SYNC, the FpuPC update in the second execution
// cycle and its suppression while an exception is pending, the exception trap and its deferral
// in suspended cycles, blocking of ordinary instructions in suspended cycles, and the
// cancellation of a parked operation by TRAP_CALL.
module tb_cpu_fpu_if;
  import spur_fpu_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, upsw_we, upsw_parallel, upsw_enable, fpu_parallel, fpu_enable;
  logic cpu_valid, core_susp, trap_mask, cpu_issue, fpu_stall, emul_trap, exc_trap, brtf;
  instr_t cpu_instr;
  logic [31:0] cpu_pc, fpu_pc;
  logic fpu_new_instr, fpu_suspend, fpu_busy, fpu_except, fpu_brtf;
  logic [6:0] fpu_opcode;
  logic [4:0] fpu_rs1, fpu_rs2, fpu_rd;
  int checks = 0, failures = 0;

  cpu_fpu_if dut (.*);

  // FPU model: busy for NB cycles per operation, then one write cycle
  localparam int NB = 3;
  int bcnt, pend;
  logic mpark;
  always_ff @(posedge clk) begin
    if (rst) begin
      bcnt <= 0; pend <= 0; mpark <= 0;
    end else begin
      int p;
      p = pend;
      if (fpu_new_instr && !fpu_suspend && classify(fpu_opcode) == CL_EU) p++;
      if (!fpu_new_instr && !fpu_suspend && mpark) p++;
      if (fpu_new_instr) mpark <= fpu_suspend && classify(fpu_opcode) == CL_EU;
      else if (!fpu_suspend) mpark <= 0;
      if (bcnt > 0) bcnt <= bcnt - 1;
      else if (p > 0) begin bcnt <= NB; p--; end
      pend <= p;
    end
  end
  assign fpu_busy = bcnt > 0;

  task automatic chk(input logic [63:0] got, input logic [63:0] exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s: got %h expected %h (t=%0t)", what, got, exp_v, $time);
    end
  endtask

  task automatic cyc(input logic v = 0, input logic [6:0] op = 7'h01, input logic [31:0] pc = 0,
                     input logic su = 0);
    @(negedge clk);
    upsw_we = 0;
    cpu_valid = v; cpu_instr = '{opcode: op, rs1: 5'd1, rs2: 5'd2, rd: 5'd3};
    cpu_pc = pc; core_susp = su;
    #1;
  endtask

  task automatic set_upsw(input logic par, input logic en);
    @(negedge clk);
    cpu_valid = 0; upsw_we = 1; upsw_parallel = par; upsw_enable = en;
  endtask

  task automatic idle(input int n);
    repeat (n) cyc();
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [6:0] CPU = 7'h01;

  initial begin
    int st;
    rst = 1; upsw_we = 0; upsw_parallel = 0; upsw_enable = 0; cpu_valid = 0;
    cpu_instr = '0; cpu_pc = 0; core_susp = 0; trap_mask = 0; fpu_except = 0; fpu_brtf = 0;
    repeat (2) @(negedge clk);
    rst = 0;

    // --- no FPU: FPU instructions trap to emulation, CPU instructions go out and are broadcast
    cyc(1, OP_FADD, 32'h10);
    chk({emul_trap, cpu_issue, fpu_new_instr}, 3'b100, "FADD without FPU -> emulation trap");
    cyc(1, OP_LD_DBL, 32'h14);
    chk({emul_trap, cpu_issue}, 2'b10, "FPU load without FPU -> emulation trap");
    cyc(1, CPU, 32'h18);
    chk({emul_trap, cpu_issue, fpu_new_instr}, 3'b011, "CPU instruction broadcast");
    chk({fpu_opcode, fpu_rs1, fpu_rs2, fpu_rd}, {CPU, 5'd1, 5'd2, 5'd3}, "broadcast fields");

    // --- FPU present, parallel
    set_upsw(1, 1);
    cyc();
    chk({fpu_parallel, fpu_enable}, 2'b11, "Upsw bits written");

    // FpuPC written in the second execution cycle
    cyc(1, OP_FADD, 32'h100);             // issue (edge ends this cycle)
    chk(cpu_issue, 1, "FADD issued");
    cyc(); cyc();                         // Ex1, Ex2
    chk(fpu_pc, 0, "FpuPC not yet written in Ex2");
    cyc();                                // Ex3
    chk(fpu_pc, 32'h100, "FpuPC written at the end of Ex2");
    // busy interlock
    cyc(1, OP_FMUL, 32'h104);
    chk({fpu_stall, cpu_issue}, 2'b10, "FMUL held back while fpuBusy");
    cyc(1, CPU, 32'h108);
    chk({fpu_stall, cpu_issue}, 2'b01, "CPU instruction not held back by fpuBusy");
    cyc(1, OP_LD_DBL, 32'h10C);
    chk({fpu_stall, cpu_issue}, 2'b01, "FPU load not held back by fpuBusy");
    cyc(1, OP_FABS, 32'h110);
    chk({fpu_stall, cpu_issue}, 2'b01, "FABS issued once the latched fpuBusy fell");
    idle(8);
    chk(fpu_pc, 32'h100, "FABS cannot raise an exception: FpuPC kept");

    // two back-to-back operations: the second is buffered in the FPU
    cyc(1, OP_FADD, 32'h200);
    cyc(1, OP_FMUL, 32'h204);
    chk(cpu_issue, 1, "second operation issued in Ex1 (busy not yet latched)");
    idle(3);
    chk(fpu_pc, 32'h200, "FpuPC for the first operation");
    idle(5);
    chk(fpu_pc, 32'h204, "FpuPC for the buffered operation when it starts");
    idle(6);

    // SYNC waits for all outstanding operations
    cyc(1, OP_FADD, 32'h300);
    st = 0;
    do begin cyc(1, OP_SYNC, 32'h304); st += int'(fpu_stall); end while (!cpu_issue && st < 20);
    chk(st >= NB, 1, "SYNC held back until the operation finished");
    chk(fpu_busy, 0, "SYNC issued only with the FPU idle");

    // FpuPC not written while an exception is pending
    idle(3);
    cyc(1, OP_FDIV, 32'h400);
    @(negedge clk); fpu_except = 1;
    cyc();                                 // exc latched
    chk(exc_trap, 1, "exception trap raised");
    cyc(1, CPU, 32'h404);
    chk({cpu_issue, exc_trap}, 2'b01, "ordinary instruction blocked by exception");
    idle(3);
    chk(fpu_pc, 32'h300, "FpuPC not written while an exception is pending");
    // exception deferred in a suspended cycle
    cyc(0, CPU, 0, 1);
    cyc();
    chk(exc_trap, 0, "exception trap deferred during suspension");
    cyc(1, OP_TRAP_CALL, 32'h408);
    chk({exc_trap, cpu_issue}, 2'b11, "TRAP_CALL issued to take the exception");
    @(negedge clk); trap_mask = 1; cpu_valid = 0; #1;
    chk(exc_trap, 0, "no trap request while traps are disabled");
    cyc(1, OP_LD_DBL, 32'h40C);
    chk(cpu_issue, 1, "handler can issue FPU loads while traps are disabled");
    trap_mask = 0;
    @(negedge clk); fpu_except = 0;
    idle(6);

    // suspension: ordinary instructions wait, internal ones go out; fpuSuspend forwarded
    cyc(1, CPU, 32'h500, 1);
    chk({cpu_issue, fpu_suspend}, 2'b11, "instruction issued in the cycle suspension starts");
    cyc(1, CPU, 32'h504, 0);
    chk(cpu_issue, 0, "no ordinary issue in a suspended cycle");
    cyc(1, OP_MISS, 32'h504, 0);
    chk(cpu_issue, 1, "internal MISS issued in a suspended cycle");
    cyc(1, CPU, 32'h504);
    chk(cpu_issue, 1, "issue resumes");

    // an FPU operation parked by a suspension and cancelled by TRAP_CALL is not outstanding
    idle(4);
    cyc(1, OP_FADD, 32'h600, 1);
    chk(cpu_issue, 1, "FADD issued as suspension starts");
    cyc(1, OP_TRAP_CALL, 32'h604, 0);
    chk(cpu_issue, 1, "TRAP_CALL in the suspended cycle");
    cyc(1, OP_SYNC, 32'h608);
    chk({fpu_stall, cpu_issue}, 2'b01, "cancelled operation is not waited for by SYNC");
    idle(8);
    chk(fpu_pc, 32'h300, "cancelled operation never writes FpuPC");

    // sequential mode: nothing issues after an FPU operation until it is done
    set_upsw(0, 1);
    cyc();
    cyc(1, OP_FADD, 32'h700);
    chk(cpu_issue, 1, "FADD issued in sequential mode");
    st = 0;
    do begin cyc(1, CPU, 32'h704); st += int'(fpu_stall); end while (!cpu_issue && st < 20);
    chk(st >= NB, 1, "sequential mode holds the next instruction");
    chk(fpu_busy, 0, "next instruction only after the operation");

    // brtf is the latched-through fpuBrT_F
    @(negedge clk); fpu_brtf = 1; #1;
    chk(brtf, 1, "fpuBrT_F passed to branch logic");
    fpu_brtf = 0;
    // disabling the FPU again
    set_upsw(1, 0);
    cyc(1, OP_ST_DBL, 32'h800);
    chk({emul_trap, cpu_issue}, 2'b10, "store without FPU -> emulation trap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
