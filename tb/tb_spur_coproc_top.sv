// tb_spur_coproc_top: end-to-end test of the CPU-FPU pair at its default size.
//
// A behavioural CPU drives the issue stage of spur_coproc_top from a program: it offers one
// instruction per cycle, takes the emulation trap (skips the instruction) when no FPU is
// enabled, and takes traps with the internal TRAP_CALL: the FPU exception trap (a handler that
// stores and rewrites the Fpsw through specifier 15 and reads FpuPC) and page faults on CPU
// and FPU memory references. After a trap it restarts at the victim instruction. A behavioural
// cache follows the CPU's Exec/Mem pipeline: a hit answers in the Mem cycle, a miss suspends the
// pipeline (core_susp) for three cycles and answers in the last suspended cycle, a fault
// suspends and never answers. Stores are checked against expected words; results of FADD,
// FSUB, FMUL and loads are read back by stores.
// The program walks through the scenarios of the description: emulation without an FPU,
// sequential mode, parallel mode with the fpuBusy stall, the one-entry buffer and SYNC, a CPU
// load miss with an FPU load behind it (Figure 13), traps on a CPU and on an FPU page fault
// (Figures 15 and 16: parked instruction, NoWr, kill) and two FPU operations in series with an
// arithmetic exception on the first (Figure 17: the second, buffered one is killed by the
// TRAP_CALL and restarted, a third one held back by fpuBusy never issues before the trap). Each interface mechanism is counted; a
// mechanism that never happens counts as a failure.
module tb_spur_coproc_top;
  import spur_fpu_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, upsw_we, upsw_parallel, upsw_enable, cpu_valid, core_susp, trap_mask;
  instr_t cpu_instr;
  logic [31:0] cpu_pc, fpu_pc;
  logic cpu_issue, fpu_stall, emul_trap, exc_trap, brtf, cpu_data_valid;
  logic data_may_be_valid, proc_tag_match, data_is_valid, st_data_oe;
  logic [63:0] ld_data, st_data;
  logic fpu_busy, fpu_except, fpu_new_instr, fpu_suspend, fpu_parallel, fpu_enable;
  int checks = 0, failures = 0;

  spur_coproc_top dut (.*);

  localparam logic [6:0] NOP  = 7'h01;   // any CPU instruction
  localparam logic [6:0] CLD  = 7'h02;   // CPU load
  localparam logic [6:0] UPSW = 7'h7B;   // testbench pseudo-op: write the Upsw bits (rd[1:0])
  localparam int K = 3;                  // cache miss: suspended cycles

  typedef struct packed {
    logic [6:0]  op;
    logic [4:0]  rs1, rs2, rd;
    logic [63:0] data;      // load data, or expected store word
    logic        miss, fault, chk;
  } pent_t;

  typedef struct packed {
    logic        v;
    pent_t       e;
    logic [31:0] ip;
    logic [3:0]  wait_n;
  } stg_t;

  pent_t prog [160];
  int    nprog = 0;
  pent_t hand [16];
  int    nhand = 0;
  logic [31:0] exc_pc;

  function automatic pent_t ent(input logic [6:0] op, input int rd = 0, input int rs1 = 0,
                                input int rs2 = 0, input logic [63:0] data = 0,
                                input logic miss = 0, input logic fault = 0,
                                input logic chk = 0);
    return '{op: op, rs1: 5'(rs1), rs2: 5'(rs2), rd: 5'(rd), data: data, miss: miss,
             fault: fault, chk: chk};
  endfunction
  function automatic void add(input pent_t e);
    prog[nprog] = e;
    nprog++;
  endfunction
  function automatic void ld(input int rd, input real v, input logic miss = 0,
                             input logic fault = 0);
    add(ent(OP_LD_DBL, rd, 0, 0, $realtobits(v), miss, fault));
  endfunction
  function automatic void st(input int rs, input real v);
    add(ent(OP_ST_DBL, 0, 0, rs, $realtobits(v), 0, 0, 1));
  endfunction
  function automatic void op3(input logic [6:0] op, input int rd, input int rs1, input int rs2);
    add(ent(op, rd, rs1, rs2));
  endfunction
  function automatic void nops(input int n);
    repeat (n) add(ent(NOP, 5, 3, 4));
  endfunction

  function automatic logic is_mem(input logic [6:0] op);
    return op == CLD || classify(op) inside {CL_LOAD, CL_STORE};
  endfunction
  function automatic logic [31:0] pc_of(input int ip);
    return 32'h1000 + 32'(ip) * 4;
  endfunction

  task automatic chk(input logic [63:0] got, input logic [63:0] exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s: got %h expected %h (t=%0t)", what, got, exp_v, $time);
    end
  endtask

  // mechanism counters
  int n_stall, n_buffer, n_park, n_nowr, n_kill, n_memwait, n_exc, n_seq, n_emul, n_fpupc;
  int n_sync, n_fault, n_abort, n_overlap;

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stg_t F, E, M, nF;
    int ip, hip, last_ip, cycles;
    logic kill_now;
    logic in_hand, fault_now, dv_now, is_trap_off, exc_off, upsw_off, iss, em;
    pent_t off;
    logic [31:0] prev_fpu_pc;

    // ---------------------------------------------------------------- program
    // A: no FPU enabled
    op3(OP_FADD, 3, 1, 2);
    ld(1, 9.0);
    nops(1);
    add(ent(UPSW, 2'b01));                       // sequential, FPU present
    // B: sequential mode
    ld(1, 1.5); ld(2, 2.25); ld(9, 1.0); ld(10, 2.0); ld(12, 1.0); ld(13, 0.0);
    nops(2);
    op3(OP_FADD, 3, 1, 2);                       // 3.75
    nops(2);
    add(ent(UPSW, 2'b11));                       // parallel
    // C: parallel mode: busy stall, buffer, SYNC
    op3(OP_FMUL, 4, 1, 2);                       // 3.375
    op3(OP_FADD, 5, 1, 1);                       // 3.0, buffered
    op3(OP_FSUB, 6, 2, 1);                       // 0.75, held back by fpuBusy
    nops(1);
    add(ent(OP_SYNC));
    st(3, 3.75); st(4, 3.375); st(5, 3.0); st(6, 0.75);
    // D: Figure 13, CPU load miss with an FPU load behind it
    add(ent(CLD, 5, 3, 4, 64'hDEAD_BEEF_DEAD_BEEF, 1));
    ld(7, 5.0);
    op3(OP_FADD, 8, 1, 2);                       // 3.75, parked
    nops(3);
    add(ent(OP_SYNC));
    st(7, 5.0); st(8, 3.75);
    // E: Figure 15, CPU page fault
    add(ent(CLD, 5, 3, 4, 64'hDEAD_BEEF_DEAD_BEEF, 1, 1));
    op3(OP_FADD, 9, 9, 1);                       // 1.0 + 1.5 = 2.5 (twice would be 4.0)
    op3(OP_FMUL, 10, 10, 2);                     // 2.0 * 2.25 = 4.5, parked
    nops(2);
    add(ent(OP_SYNC));
    st(9, 2.5); st(10, 4.5);
    // F: Figure 16, FPU page fault
    ld(11, 7.0, 1, 1);
    op3(OP_FADD, 12, 12, 1);                     // 1.0 + 1.5 = 2.5
    st(1, 1.5);                                  // parked, overwritten by TRAP_CALL
    nops(2);
    add(ent(OP_SYNC));
    st(11, 7.0); st(12, 2.5);
    // G: Figure 17, two FPU operations in series, the first raises an exception
    exc_pc = pc_of(nprog);
    op3(OP_FDIV, 14, 1, 13);                     // 1.5 / 0: operand exception
    op3(OP_FADD, 5, 2, 2);                       // 4.5, buffered, killed by the trap, restarted
    op3(OP_FMUL, 4, 2, 1);                       // 3.375, held back by fpuBusy until the trap
    nops(4);
    add(ent(OP_SYNC));
    st(5, 4.5); st(4, 3.375);
    ld(15, 0.0);                                 // Fpsw <- 0 (flags and enables clear)
    nops(3);
    add(ent(OP_ST_DBL, 0, 0, 15, 64'h0, 0, 0, 1));
    nops(2);
    // exception handler
    hand[0] = ent(OP_ST_DBL, 0, 0, 15, 64'h71, 0, 0, 1);   // flags: operand; enables 0111
    hand[1] = ent(OP_LD_DBL, 15, 0, 0, 64'h70);            // clear the flags
    for (int i = 2; i < 9; i++) hand[i] = ent(NOP, 5, 3, 4);
    nhand = 9;

    // ---------------------------------------------------------------- run
    rst = 1; upsw_we = 0; upsw_parallel = 0; upsw_enable = 0; cpu_valid = 0; core_susp = 0;
    trap_mask = 0; cpu_instr = '0; cpu_pc = 0; data_may_be_valid = 0; proc_tag_match = 0;
    data_is_valid = 0; ld_data = 0;
    F = '0; E = '0; M = '0;
    ip = 0; hip = 0; last_ip = 0; in_hand = 0; cycles = 0;
    {n_stall, n_buffer, n_park, n_nowr, n_kill, n_memwait, n_exc, n_seq, n_emul, n_fpupc} = '0;
    {n_sync, n_fault, n_abort, n_overlap} = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    prev_fpu_pc = fpu_pc;

    while (ip < nprog || in_hand || F.v || E.v || M.v) begin
      @(negedge clk);
      trap_mask = in_hand;
      cycles++;
      // cache side, from the Mem stage
      fault_now = M.v && is_mem(M.e.op) && M.e.fault && M.wait_n == 0;
      dv_now    = M.v && is_mem(M.e.op) && M.wait_n == 0 && !M.e.fault;
      core_susp = M.v && is_mem(M.e.op) && M.wait_n != 0;
      data_is_valid     = dv_now && !M.e.miss;
      data_may_be_valid = dv_now && M.e.miss;
      proc_tag_match    = dv_now && M.e.miss;
      ld_data           = M.e.data;
      upsw_we = 0;
      #1;
      // issue stage
      is_trap_off = 0; exc_off = 0; upsw_off = 0;
      if (fault_now) begin
        off = ent(OP_TRAP_CALL); is_trap_off = 1;
      end else if (exc_trap) begin
        off = ent(OP_TRAP_CALL); is_trap_off = 1; exc_off = 1;
      end else if (in_hand) begin
        off = hand[hip];
      end else if (ip < nprog) begin
        off = prog[ip];
        if (off.op == UPSW) upsw_off = 1;
      end else begin
        off = ent(NOP);
      end
      cpu_valid = (is_trap_off || in_hand || ip < nprog) && !upsw_off;
      cpu_instr = '{opcode: off.op, rs1: off.rs1, rs2: off.rs2, rd: off.rd};
      cpu_pc    = in_hand ? 32'h2000 + 32'(hip) * 4 : pc_of(ip);
      if (upsw_off) begin
        upsw_we = 1; upsw_parallel = off.rd[1]; upsw_enable = off.rd[0];
      end
      #1;
      iss = cpu_issue;
      em  = emul_trap;
      kill_now = dut.u_fpu.eu_kill;

      // stores: the word on the bus when the cache takes it
      if (dv_now && classify(M.e.op) == CL_STORE) begin
        chk(st_data_oe, 1, "store drives the bus");
        if (M.e.chk) chk(st_data, M.e.data, $sformatf("store word at ip %0d", M.ip));
      end
      if (cpu_data_valid != dv_now) chk(cpu_data_valid, dv_now, "CPU dataValid composite");

      // mechanism counters
      if (fpu_stall && fpu_parallel && classify(off.op) == CL_EU) n_stall++;
      if (fpu_stall && classify(off.op) == CL_SYNC) n_sync++;
      if (fpu_stall && !fpu_parallel) n_seq++;
      if (em) n_emul++;
      if (dut.u_fpu.u_icu.buf_q.valid && !dut.u_fpu.eu_start) n_buffer++;
      if (dut.u_fpu.u_icu.park_v) n_park++;
      if (dut.u_fpu.u_eu.stalled) n_nowr++;
      if (dut.u_fpu.u_eu.killed || (dut.u_fpu.eu_kill && dut.u_fpu.u_icu.buf_live)) n_kill++;
      if (dut.u_fpu.u_icu.mem_live && !dut.u_fpu.dv && dut.u_fpu.u_icu.mem_q.cls != CL_MOVE)
        n_memwait++;
      if (dut.u_fpu.u_icu.mem_abort) n_abort++;
      if (fpu_busy && dut.u_fpu.u_icu.mem_live) n_overlap++;
      if (fpu_pc != prev_fpu_pc) n_fpupc++;
      prev_fpu_pc = fpu_pc;

      @(posedge clk);
      // ---- state update at the edge
      nF = F;
      if (upsw_off) ip++;
      if (iss && is_trap_off) begin
        if (exc_off) begin
          n_exc++;
          chk(fpu_pc, exc_pc, "FpuPC holds the excepting operation at the trap");
          chk(kill_now, 1, "the operation received after the excepting one is killed");
          chk(int'(last_ip), int'((exc_pc - 32'h1000) / 4) + 1, "trap victim is that operation");
          E.v = 0;                       // the victim is killed and restarted
          if (last_ip >= 0) ip = last_ip;
          in_hand = 1; hip = 0;
        end else begin
          n_fault++;
          ip = int'(M.ip);
          prog[ip].fault = 0;            // serviced: the restart finds the page
          M.v = 0; E.v = 0; F.v = 0;
        end
        nF = '0;
      end else if (iss) begin
        nF = '{v: 1'b1, e: off, ip: 32'(ip), wait_n: '0};
        if (in_hand) hip++;
        else begin
          last_ip = ip;
          ip++;
        end
      end else if (em) begin
        ip++;
      end
      if (in_hand && hip == nhand) in_hand = 0;
      // pipeline
      if (core_susp) begin
        if (M.wait_n != 0) M.wait_n--;
        F = nF;
      end else begin
        M = E;
        if (M.v && is_mem(M.e.op) && (M.e.miss || M.e.fault)) M.wait_n = 4'(K);
        E = nF;
        F = '0;
      end
      if (cycles > 4000) break;
    end
    chk(ip, nprog, "whole program issued");
    $display("mechanisms: stall=%0d buffer=%0d park=%0d nowr=%0d kill=%0d memwait=%0d exc=%0d",
             n_stall, n_buffer, n_park, n_nowr, n_kill, n_memwait, n_exc);
    $display("            seq=%0d emul=%0d fpupc=%0d sync=%0d fault=%0d abort=%0d overlap=%0d",
             n_seq, n_emul, n_fpupc, n_sync, n_fault, n_abort, n_overlap);
    chk(n_stall   > 0, 1, "fpuBusy stall happened");
    chk(n_buffer  > 0, 1, "buffered operation happened");
    chk(n_park    > 0, 1, "parked instruction happened");
    chk(n_nowr    > 0, 1, "NoWr (blocked write) happened");
    chk(n_kill    > 0, 1, "TRAP_CALL kill happened");
    chk(n_memwait > 0, 1, "Mem wait for dataValid happened");
    chk(n_exc     > 0, 1, "exception trap happened");
    chk(n_seq     > 0, 1, "sequential-mode hold happened");
    chk(n_emul    > 0, 1, "emulation trap happened");
    chk(n_fpupc   > 0, 1, "FpuPC update happened");
    chk(n_sync    > 0, 1, "SYNC hold happened");
    chk(n_fault   > 0, 1, "page-fault trap happened");
    chk(n_abort   > 0, 1, "faulted FPU access abandoned");
    chk(n_overlap > 0, 1, "memory transfer overlapped arithmetic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
