// fpu_icu: the FPU interface control unit (ICU).
//
// The FPU is an instruction tracker: the CPU broadcasts the 22-bit opcode/specifier fragment
// of every instruction it issues, with fpuNewInstr_CV3, and the ICU decodes each one in
// parallel with the CPU. This unit
//   * receives instructions and tags each with a sequence number; CPU instructions (and the
//     internal MISS and READ_PC instructions) are received and otherwise ignored;
//   * starts arithmetic operations in the execution unit, or holds one of them in a one-entry
//     buffer while the unit is busy (the CPU interlock on fpuBusy keeps a second one away);
//   * runs loads, stores and FMOV through its own Exec, Mem and Wr stages on register file
//     port B, so they overlap arithmetic. A load or store waits in Mem, repeating it, until
//     dataValid is seen; a store drives its word on the data bus during Mem. Load data is
//     written to the register file at the end of the Wr cycle (usable by the third
//     instruction after the load; there is no forwarding). Specifier 15 names the Fpsw;
//   * obeys fpuSuspend_CV4. An instruction latched in a cycle whose fpuSuspend is high is
//     still in its fetch cycle: it is parked and only received when the suspension ends (or
//     overwritten by a later broadcast such as TRAP_CALL). The instruction received just before
//     a suspension began (issued after the instruction that caused it) may run but may not
//     write its result while the suspension lasts; a load or store in Exec does not enter Mem,
//     so an earlier dataValid pulse cannot mislead it. Older operations finish normally;
//   * on the internal TRAP_CALL instruction kills the last instruction received before it, if
//     that was an FPU instruction, wherever it is (buffer, execution unit or Exec/Mem/Wr).
//     A load or store still waiting in Mem for its data when TRAP_CALL arrives is abandoned as
//     well: only a page or bus fault traps while an access is outstanding, and the faulting
//     access is restarted by the CPU after the trap (this design's reading of Section 3.6).
// Timing: one clock edge per SPUR cycle; every input is sampled at the edge that ends the
// cycle (new_instr/instr at the end of phase 3, suspend at the end of phase 4, data_valid in
// phase 3). The holding of a parked instruction during a suspension is this design's choice:
// the description allows an FPU op to progress while suspended (its Figure 9), but requires
// only that it be killable, which parking also meets.
module fpu_icu
  import spur_fpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // from the CPU
  input  logic        new_instr,     // fpuNewInstr_CV3
  input  instr_t      instr,         // fpuOPCODE_CV3, fpuRS1_CV3, fpuRS2_CV3, fpuRD_CV3
  input  logic        suspend,       // fpuSuspend_CV4
  // from the cache
  input  logic        data_valid,
  input  logic [63:0] ld_data,
  output logic [63:0] st_data,
  output logic        st_data_oe,
  // execution unit
  output logic        eu_start,
  output instr_t      eu_instr,
  output seq_t        eu_seq,
  input  logic        eu_accept,
  input  logic        eu_active,
  input  seq_t        eu_cur_seq,
  output logic        eu_blk,
  output seq_t        eu_blk_seq,
  output logic        eu_kill,
  output seq_t        eu_kill_seq,
  output logic [4:0]  rfa_rs1,       // port A read addresses for a starting operation
  output logic [4:0]  rfa_rs2,
  // register file port B
  output logic [4:0]  rfb_rs,
  input  fpreg_t      rfb_rd,
  output logic        rfb_we_hi,
  output logic        rfb_we_frac,
  output logic [4:0]  rfb_wa,
  output fpreg_t      rfb_wd,
  // Fpsw software access
  output logic        fpsw_we,
  output logic [63:0] fpsw_wdata,
  input  logic [63:0] fpsw_rdata
);
  typedef struct packed {
    logic    valid;
    iclass_e cls;
    instr_t  ins;
    seq_t    seq;
  } slot_t;

  typedef struct packed {
    logic        valid;
    iclass_e     cls;
    instr_t      ins;
    seq_t        seq;
    logic [63:0] word;   // store word (Mem) or load word (Wr)
    fpreg_t      val;    // FMOV source value
  } mslot_t;

  instr_t park_ins;     // instruction latched while suspended (still in its fetch cycle)
  logic   park_v;
  slot_t  buf_q;        // arithmetic operation waiting for the execution unit
  slot_t  ex_q;         // memory pipe stages
  mslot_t mem_q, wr_q;
  seq_t   seq_ctr, last_seq;
  logic   last_fpu;     // last received instruction was an FPU instruction
  logic   rx_prev;      // an instruction was received at the previous edge
  logic   hold_q;       // a suspension is in progress that began after that reception

  // ---------------------------------------------------------------- reception
  logic    trap_now, rx, rx_is_new;
  instr_t  rx_ins;
  iclass_e rx_cls;
  seq_t    rx_seq;
  logic    kill_v;

  always_comb begin
    trap_now  = new_instr && classify(instr.opcode) == CL_TRAP;
    rx_is_new = new_instr && !suspend;
    rx        = trap_now || rx_is_new || (!new_instr && !suspend && park_v);
    rx_ins    = (new_instr) ? instr : park_ins;
    rx_cls    = classify(rx_ins.opcode);
    rx_seq    = seq_ctr + seq_t'(1);
    kill_v    = trap_now && last_fpu;
  end

  // ---------------------------------------------------------------- kill and suspend control
  logic blk_now;
  always_comb begin
    blk_now     = suspend && (hold_q || rx_prev);
    eu_blk      = blk_now;
    eu_blk_seq  = last_seq;
    eu_kill     = kill_v;
    eu_kill_seq = last_seq;
  end

  function automatic logic killed(input logic v, input seq_t s);
    return v && kill_v && s == last_seq;
  endfunction

  // ---------------------------------------------------------------- execution unit dispatch
  logic buf_live, rx_eu;
  always_comb begin
    buf_live = buf_q.valid && !killed(buf_q.valid, buf_q.seq);
    rx_eu    = rx && rx_cls == CL_EU;
    eu_start = eu_accept && (buf_live || rx_eu);
    if (buf_live) begin
      eu_instr = buf_q.ins;
      eu_seq   = buf_q.seq;
    end else begin
      eu_instr = rx_ins;
      eu_seq   = rx_seq;
    end
    rfa_rs1 = eu_instr.rs1;
    rfa_rs2 = eu_instr.rs2;
  end

  // ---------------------------------------------------------------- memory pipe
  logic   wr_live, mem_live, ex_live, mem_leave, ex_adv, mem_abort;
  memfmt_e ld_fmt, st_fmt;
  fpreg_t ld_reg, st_src;
  logic   ld_we_hi, ld_we_frac;
  logic [63:0] st_word;

  fpu_memfmt u_fmt (
    .ld_fmt    (ld_fmt),
    .ld_word   (wr_q.word),
    .ld_reg    (ld_reg),
    .ld_we_hi  (ld_we_hi),
    .ld_we_frac(ld_we_frac),
    .st_fmt    (st_fmt),
    .st_reg    (st_src),
    .st_word   (st_word)
  );

  always_comb begin
    wr_live  = wr_q.valid  && !killed(wr_q.valid, wr_q.seq);
    mem_live = mem_q.valid && !killed(mem_q.valid, mem_q.seq);
    ex_live  = ex_q.valid  && !killed(ex_q.valid, ex_q.seq);
    // Mem is left when the data arrived (load/store) or at once (FMOV)
    mem_leave = mem_live && (mem_q.cls == CL_MOVE || data_valid);
    mem_abort = mem_live && !mem_leave && trap_now;
    // Exec enters Mem only outside a suspension and when Mem is free
    ex_adv = ex_live && !suspend && (!mem_live || mem_leave || mem_abort);

    // Exec stage reads port B: the store source (Rs2 field) or the FMOV source (Rs1)
    rfb_rs = (ex_q.cls == CL_STORE) ? ex_q.ins.rs2 : ex_q.ins.rs1;
    st_src = rfb_rd;
    st_fmt = mem_format(ex_q.ins.opcode);

    // store data on the bus during Mem
    st_data    = mem_q.word;
    st_data_oe = mem_live && mem_q.cls == CL_STORE;

    // Wr stage writes port B or the Fpsw
    ld_fmt      = mem_format(wr_q.ins.opcode);
    rfb_wa      = wr_q.ins.rd;
    fpsw_wdata  = wr_q.word;
    fpsw_we     = wr_live && wr_q.cls == CL_LOAD && wr_q.ins.rd == FPSW_SPEC;
    rfb_we_hi   = 1'b0;
    rfb_we_frac = 1'b0;
    rfb_wd      = wr_q.val;
    if (wr_live && 32'(wr_q.ins.rd) < NREGS) begin
      if (wr_q.cls == CL_LOAD) begin
        rfb_wd      = ld_reg;
        rfb_we_hi   = ld_we_hi;
        rfb_we_frac = ld_we_frac;
      end else begin
        rfb_we_hi   = 1'b1;
        rfb_we_frac = 1'b1;
      end
    end
  end

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk) begin
    if (rst) begin
      park_v   <= 1'b0;
      park_ins <= '0;
      buf_q    <= '0;
      ex_q     <= '0;
      mem_q    <= '0;
      wr_q     <= '0;
      seq_ctr  <= '0;
      last_seq <= '0;
      last_fpu <= 1'b0;
      rx_prev  <= 1'b0;
      hold_q   <= 1'b0;
    end else begin
      // parked instruction: latched during a suspension, dropped when received or overwritten
      if (new_instr && suspend && !trap_now) begin
        park_v   <= 1'b1;
        park_ins <= instr;
      end else if (rx || new_instr) begin
        park_v <= 1'b0;
      end

      rx_prev <= rx;
      hold_q  <= suspend && (hold_q || rx_prev);
      if (rx) begin
        seq_ctr  <= rx_seq;
        last_seq <= rx_seq;
        last_fpu <= rx_cls inside {CL_EU, CL_LOAD, CL_STORE, CL_MOVE};
      end

      // arithmetic buffer
      if (eu_start && buf_live) buf_q.valid <= 1'b0;
      else if (!buf_live)       buf_q.valid <= 1'b0;
      if (rx_eu && !(eu_start && !buf_live)) begin
        buf_q <= '{valid: 1'b1, cls: CL_EU, ins: rx_ins, seq: rx_seq};
      end

      // Wr stage drains every cycle
      wr_q.valid <= 1'b0;
      if (mem_leave && mem_q.cls != CL_STORE) begin
        wr_q       <= mem_q;
        wr_q.valid <= 1'b1;
        if (mem_q.cls == CL_LOAD) wr_q.word <= ld_data;
      end

      // Mem stage
      if (!mem_live || mem_leave || mem_abort) mem_q.valid <= 1'b0;
      if (ex_adv) begin
        mem_q.valid <= 1'b1;
        mem_q.cls   <= ex_q.cls;
        mem_q.ins   <= ex_q.ins;
        mem_q.seq   <= ex_q.seq;
        mem_q.val   <= rfb_rd;
        mem_q.word  <= (ex_q.cls == CL_STORE && ex_q.ins.rs2 == FPSW_SPEC) ? fpsw_rdata : st_word;
      end

      // Exec stage
      if (!ex_live || ex_adv) ex_q.valid <= 1'b0;
      if (rx && rx_cls inside {CL_LOAD, CL_STORE, CL_MOVE}) begin
        ex_q <= '{valid: 1'b1, cls: rx_cls, ins: rx_ins, seq: rx_seq};
      end
    end
  end

  // Protocol rules the CPU must keep
  assert property (@(posedge clk) disable iff (rst)
                   (rx_eu && !eu_accept) |-> !buf_live)
    else $error("fpu_icu: arithmetic operation issued while one is already waiting");
  assert property (@(posedge clk) disable iff (rst)
                   (rx && rx_cls inside {CL_LOAD, CL_STORE, CL_MOVE}) |-> (!ex_live || ex_adv))
    else $error("fpu_icu: memory transfer issued while Exec is still occupied");

  // eu_active and eu_cur_seq are observed only by the assertion below
  assert property (@(posedge clk) disable iff (rst)
                   (eu_active && rx_eu && !eu_accept) |-> eu_cur_seq != rx_seq)
    else $error("fpu_icu: sequence tag reused while an operation is in flight");
endmodule
