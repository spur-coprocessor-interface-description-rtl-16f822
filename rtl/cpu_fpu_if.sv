// cpu_fpu_if: the CPU side of the SPUR coprocessor interface.
//
// Sits between the CPU's issue stage and the FPU. Every instruction the CPU issues is
// broadcast to the coprocessor with fpuNewInstr_CV3 and its 22-bit opcode/specifier fragment.
// The unit
//   * keeps the two Upsw bits: fpuEnable (an FPU is present; when clear, an FPU instruction is
//     not issued and emul_trap asks the CPU to trap to the software routines) and fpuParallel
//     (when clear, sequential mode: after an FPU operation nothing is issued until it is done);
//   * latches fpuBusy_C4, fpuExcept_C4 and fpuBrT_F_C4 once per cycle and holds back (stall,
//     the CPU's internal suspension) an FPU operation while the FPU reports busy, and a SYNC
//     until every FPU operation issued so far has finished;
//   * keeps FpuPC, the address of the last FPU operation that can raise an exception. The
//     address is written in the operation's second execution cycle (the CPU's Mem cycle), which
//     the unit recognises as the cycle in which the latched fpuBusy rises, and only if no FPU
//     exception is pending;
//   * raises exc_trap while an FPU exception is pending, except in cycles suspended for a
//     cache miss or in which a suspension begins (the exception is then taken afterwards),
//     and while the CPU runs with traps disabled (trap_mask, set by the CPU in its trap handler so that the handler can read and
//     rewrite the Fpsw); while it is raised only the CPU's internal instructions (TRAP_CALL,
//     MISS, READ_PC) are issued;
//   * forwards the CPU's own pipeline suspension (cache miss and the like) as fpuSuspend_CV4.
//     Suspension caused by fpuBusy is not forwarded, as the description requires.
// Instructions issued while a suspension is being entered stay in their fetch cycle inside the
// FPU; the unit mirrors that so that it knows which FPU operation a TRAP_CALL cancels and can
// tell which issued operations are still outstanding. An operation is outstanding while it
// waits in the queue (issued, its fpuBusy not yet seen) or while the latched fpuBusy is high.
// Timing: one clock edge per SPUR cycle. core_susp high in cycle t means cycle t+1 is a
// suspended cycle; no instruction other than an internal one is issued in a suspended cycle.
// The broadcast fields (fpu_opcode, fpu_rs1, fpu_rs2, fpu_rd), fpu_suspend and brtf are, by
// definition of the interface, straight copies of the issued instruction, of the CPU's own
// suspension and of the FPU's fpuBrT_F; they carry no logic of their own.
// The bookkeeping queue and the tracking of operations by fpuBusy edges are this design's way
// of meeting the description's rules; it does not describe the CPU's circuits.
module cpu_fpu_if
  import spur_fpu_pkg::*;
#(
  parameter int unsigned QDEPTH = 4    // FPU operations issued but not yet started
) (
  input  logic        clk,
  input  logic        rst,
  // Upsw
  input  logic        upsw_we,
  input  logic        upsw_parallel,
  input  logic        upsw_enable,
  output logic        fpu_parallel,
  output logic        fpu_enable,
  // CPU issue stage
  input  logic        cpu_valid,      // an instruction is ready to issue
  input  instr_t      cpu_instr,
  input  logic [31:0] cpu_pc,
  input  logic        core_susp,      // CPU pipeline suspended for a reason other than the FPU
  input  logic        trap_mask,      // traps disabled (the CPU is in a trap handler)
  output logic        cpu_issue,      // the instruction was issued this cycle
  output logic        fpu_stall,      // held back because of the FPU (busy, SYNC, sequential)
  output logic        emul_trap,      // FPU instruction without an FPU: trap to software
  output logic        exc_trap,       // FPU exception pending: trap
  output logic [31:0] fpu_pc,         // FpuPC
  output logic        brtf,           // latched fpuBrT_F for branches
  // to the FPU
  output logic        fpu_new_instr,
  output logic [6:0]  fpu_opcode,
  output logic [4:0]  fpu_rs1,
  output logic [4:0]  fpu_rs2,
  output logic [4:0]  fpu_rd,
  output logic        fpu_suspend,
  // from the FPU
  input  logic        fpu_busy,
  input  logic        fpu_except,
  input  logic        fpu_brtf
);
  localparam int unsigned QW = $clog2(QDEPTH + 1);

  typedef struct packed {
    logic [31:0] pc;
    logic        save;
    logic [7:0]  tag;
  } qent_t;

  qent_t       q [QDEPTH];
  logic [QW-1:0] qcnt;
  logic [7:0]  tag_ctr;
  logic        busy_l, busy_ll, exc_l, susp_l;
  logic        park_v, park_eu;  // mirror of an instruction parked in the FPU
  logic [7:0]  park_tag;
  logic        last_eu;          // mirror of the last instruction the FPU received
  logic [7:0]  last_tag;

  iclass_e cls;
  logic    internal, is_fpu, is_trap, stall_fpu, blocked, pending;

  always_comb begin
    cls      = classify(cpu_instr.opcode);
    is_trap  = cls == CL_TRAP;
    internal = is_trap || cpu_instr.opcode inside {OP_MISS, OP_READ_PC};
    is_fpu   = cls inside {CL_EU, CL_LOAD, CL_STORE, CL_MOVE, CL_SYNC};
    exc_trap = exc_l && !susp_l && !core_susp && !trap_mask;

    pending   = qcnt != '0 || busy_l;   // an FPU operation is not finished
    stall_fpu = 1'b0;
    if (!internal) begin
      if (!fpu_parallel && pending) stall_fpu = 1'b1;   // sequential
      if (cls == CL_EU && busy_l)                         stall_fpu = 1'b1;   // interlock
      if (cls == CL_SYNC && pending) stall_fpu = 1'b1;
    end
    emul_trap = cpu_valid && is_fpu && !fpu_enable && !susp_l;
    blocked   = !internal && (susp_l || exc_trap || stall_fpu || (is_fpu && !fpu_enable));
    cpu_issue = cpu_valid && !blocked;
    fpu_stall = cpu_valid && !internal && !susp_l && stall_fpu;

    fpu_new_instr = cpu_issue;
    fpu_opcode    = cpu_instr.opcode;
    fpu_rs1       = cpu_instr.rs1;
    fpu_rs2       = cpu_instr.rs2;
    fpu_rd        = cpu_instr.rd;
    fpu_suspend   = core_susp;
    brtf          = fpu_brtf;
  end

  // bookkeeping events of this edge
  logic issue_eu, started, rx_edge, drop_park, drop_last;
  logic [QW-1:0] lidx;
  always_comb begin
    issue_eu  = cpu_issue && cls == CL_EU;
    started   = busy_l && !busy_ll && qcnt != '0;
    rx_edge   = (cpu_issue && !core_susp) || (is_trap && cpu_issue) ||
                (!cpu_issue && !core_susp && park_v);
    drop_park = cpu_issue && is_trap && park_v && park_eu;
    // the last received operation is cancelled only while it is still queued (not started)
    // (the parked one, if any, is the newest queue entry; the cancelled one comes before it)
    lidx      = qcnt - QW'(1) - QW'(drop_park);
    drop_last = cpu_issue && is_trap && last_eu && qcnt > QW'(drop_park) &&
                q[lidx[$clog2(QDEPTH)-1:0]].tag == last_tag &&
                !(started && lidx == '0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      fpu_parallel <= 1'b0;
      fpu_enable   <= 1'b0;
      fpu_pc       <= '0;
      qcnt         <= '0;
      tag_ctr      <= '0;
      busy_l       <= 1'b0;
      busy_ll      <= 1'b0;
      exc_l        <= 1'b0;
      susp_l       <= 1'b0;
      park_v       <= 1'b0;
      park_eu      <= 1'b0;
      park_tag     <= '0;
      last_eu      <= 1'b0;
      last_tag     <= '0;
      for (int i = 0; i < QDEPTH; i++) q[i] <= '0;
    end else begin
      logic [QW-1:0] n;
      if (upsw_we) begin
        fpu_parallel <= upsw_parallel;
        fpu_enable   <= upsw_enable;
      end
      busy_l  <= fpu_busy;
      busy_ll <= busy_l;
      exc_l   <= fpu_except;
      susp_l  <= core_susp;

      n = qcnt;
      // operation started in the FPU execution unit: pop, update FpuPC
      if (started) begin
        if (q[0].save && !exc_l) fpu_pc <= q[0].pc;
        for (int i = 0; i < QDEPTH - 1; i++) q[i] <= q[i+1];
        n = n - QW'(1);
      end
      // TRAP_CALL: forget the parked and the cancelled operation
      if (drop_park) begin
        n = n - QW'(1);
      end
      if (drop_last) begin
        n = n - QW'(1);
      end
      if (issue_eu) begin
        q[n[$clog2(QDEPTH)-1:0]] <= '{pc: cpu_pc, save: can_except(cpu_instr.opcode), tag: tag_ctr};
        n = n + QW'(1);
      end
      qcnt        <= n;

      // mirror of the FPU's reception of instructions
      if (cpu_issue) tag_ctr <= tag_ctr + 8'd1;
      if (cpu_issue && core_susp && !is_trap) begin
        park_v   <= 1'b1;
        park_eu  <= cls == CL_EU;
        park_tag <= tag_ctr;
      end else if (rx_edge || cpu_issue) begin
        park_v <= 1'b0;
      end
      if (rx_edge) begin
        if (cpu_issue) begin
          last_eu  <= !is_trap && cls == CL_EU;
          last_tag <= tag_ctr;
        end else begin
          last_eu  <= park_eu;
          last_tag <= park_tag;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) !(issue_eu && qcnt == QW'(QDEPTH)))
    else $error("cpu_fpu_if: FPU operation queue overflow");
endmodule
