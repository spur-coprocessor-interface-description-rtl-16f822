// fpu_chip: the SPUR floating-point coprocessor (FPU).
//
// The FPU adds 15 operand registers of 87 bits, a control/status word (Fpsw) and the
// instructions of Table 1 to the CPU. Inside, the interface control unit (fpu_icu) tracks and
// decodes the instruction stream the CPU broadcasts, the execution unit (fpu_eu) performs one
// arithmetic, compare or convert operation at a time, and loads, stores and FMOV use the second
// port of the dual-ported register file (fpu_regfile), so memory transfers overlap arithmetic.
// fpu_fpsw holds the compare result and exception flags. A copy of the dataValid composite
// (data_valid) is formed on the chip from the three cache controller pulses, as in Figure 2.
//
// Interface (one clock edge per SPUR cycle):
//   from the CPU : fpuNewInstr_CV3, fpuOPCODE_CV3, fpuRS1_CV3, fpuRS2_CV3, fpuRD_CV3,
//                  fpuSuspend_CV4
//   to the CPU   : fpuBusy_C4, fpuExcept_C4, fpuBrT_F_C4
//   from the cache controller: dataMayBeValid_V3, procTagMatch_V3, dataIsValid_V3
//   data bus     : 64-bit load data in, 64-bit store data out with an output enable
// The chip partitioning follows Figures 1 and 2; the unit-level structure follows Section 2.2.
module fpu_chip
  import spur_fpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        fpu_new_instr,
  input  logic [6:0]  fpu_opcode,
  input  logic [4:0]  fpu_rs1,
  input  logic [4:0]  fpu_rs2,
  input  logic [4:0]  fpu_rd,
  input  logic        fpu_suspend,
  output logic        fpu_busy,
  output logic        fpu_except,
  output logic        fpu_brtf,
  input  logic        data_may_be_valid,
  input  logic        proc_tag_match,
  input  logic        data_is_valid,
  input  logic [63:0] ld_data,
  output logic [63:0] st_data,
  output logic        st_data_oe
);
  instr_t      instr;
  logic        dv;
  logic        eu_start, eu_accept, eu_active, eu_blk, eu_kill;
  instr_t      eu_instr;
  seq_t        eu_seq, eu_cur_seq, eu_blk_seq, eu_kill_seq;
  logic [4:0]  rfa_rs1, rfa_rs2, rfb_rs, rfb_wa, eu_wa;
  fpreg_t      rfa_rd1, rfa_rd2, rfb_rd, rfb_wd, eu_wd;
  logic        rfb_we_hi, rfb_we_frac, eu_we;
  logic        fpsw_we;
  logic [63:0] fpsw_wdata, fpsw_rdata;
  logic        commit, commit_is_cmp, commit_cc;
  logic [3:0]  commit_flags;

  assign instr = '{opcode: fpu_opcode, rs1: fpu_rs1, rs2: fpu_rs2, rd: fpu_rd};

  data_valid u_dv (
    .data_may_be_valid(data_may_be_valid),
    .proc_tag_match   (proc_tag_match),
    .data_is_valid    (data_is_valid),
    .valid            (dv)
  );

  fpu_icu u_icu (
    .clk, .rst,
    .new_instr  (fpu_new_instr),
    .instr      (instr),
    .suspend    (fpu_suspend),
    .data_valid (dv),
    .ld_data, .st_data, .st_data_oe,
    .eu_start, .eu_instr, .eu_seq, .eu_accept, .eu_active, .eu_cur_seq,
    .eu_blk, .eu_blk_seq, .eu_kill, .eu_kill_seq,
    .rfa_rs1, .rfa_rs2,
    .rfb_rs, .rfb_rd, .rfb_we_hi, .rfb_we_frac, .rfb_wa, .rfb_wd,
    .fpsw_we, .fpsw_wdata, .fpsw_rdata
  );

  fpu_eu u_eu (
    .clk, .rst,
    .start        (eu_start),
    .start_instr  (eu_instr),
    .start_seq    (eu_seq),
    .opa          (rfa_rd1),
    .opb          (rfa_rd2),
    .accept       (eu_accept),
    .blk          (eu_blk),
    .blk_seq      (eu_blk_seq),
    .kill         (eu_kill),
    .kill_seq     (eu_kill_seq),
    .busy         (fpu_busy),
    .active       (eu_active),
    .cur_seq      (eu_cur_seq),
    .stalled      (),
    .rf_we        (eu_we),
    .rf_wa        (eu_wa),
    .rf_wd        (eu_wd),
    .commit, .commit_flags, .commit_is_cmp, .commit_cc
  );

  fpu_regfile u_rf (
    .clk,
    .a_rs1(rfa_rs1), .a_rs2(rfa_rs2), .a_rd1(rfa_rd1), .a_rd2(rfa_rd2),
    .a_we(eu_we), .a_wa(eu_wa), .a_wd(eu_wd),
    .b_rs(rfb_rs), .b_rd(rfb_rd),
    .b_we_hi(rfb_we_hi), .b_we_frac(rfb_we_frac), .b_wa(rfb_wa), .b_wd(rfb_wd)
  );

  fpu_fpsw u_fpsw (
    .clk, .rst,
    .commit, .commit_flags, .commit_is_cmp, .commit_cc,
    .sw_we   (fpsw_we),
    .sw_wdata(fpsw_wdata),
    .sw_rdata(fpsw_rdata),
    .fpu_except,
    .fpu_brtf
  );
endmodule
