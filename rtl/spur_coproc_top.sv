// spur_coproc_top: the SPUR CPU-FPU coprocessor interface, CPU side and FPU joined.
//
// The SPUR CPU issues one instruction per cycle and broadcasts every one of them to its
// floating-point coprocessor, which decodes the stream in parallel (instruction tracking).
// FPU arithmetic runs concurrently with CPU instructions and with FPU loads and stores; the
// only interlocks are fpuBusy (one arithmetic operation at a time), fpuSuspend (the CPU
// pipeline is suspended, for instance by a cache miss) and the internal TRAP_CALL, which
// cancels the last instruction the FPU received. This top joins
//   cpu_fpu_if - the coprocessor interface logic of the CPU (Upsw bits, FpuPC, interlocks),
//   fpu_chip   - the FPU coprocessor,
//   data_valid - the CPU's copy of the dataValid composite,
// over the signals of Figure 2. The rest of the CPU and the cache controller are outside: their
// signals are the ports of this module (the issue stage, the CPU's own pipeline suspension,
// the three cache controller pulses and the 64-bit data bus).
// fpu_suspend is the CPU's own pipeline suspension (core_susp) passed straight through, as the
// interface defines it; it is an output only so that the interface can be observed.
// Timing: one clock edge per SPUR cycle (the four clock phases are folded into the cycle);
// synchronous active-high reset. After reset the Upsw bits are clear (no FPU, sequential);
// software sets them with upsw_we.
module spur_coproc_top
  import spur_fpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // Upsw write
  input  logic        upsw_we,
  input  logic        upsw_parallel,
  input  logic        upsw_enable,
  // CPU issue stage
  input  logic        cpu_valid,
  input  instr_t      cpu_instr,
  input  logic [31:0] cpu_pc,
  input  logic        core_susp,
  input  logic        trap_mask,
  output logic        cpu_issue,
  output logic        fpu_stall,
  output logic        emul_trap,
  output logic        exc_trap,
  output logic [31:0] fpu_pc,
  output logic        brtf,
  output logic        cpu_data_valid,
  // cache controller and data bus
  input  logic        data_may_be_valid,
  input  logic        proc_tag_match,
  input  logic        data_is_valid,
  input  logic [63:0] ld_data,
  output logic [63:0] st_data,
  output logic        st_data_oe,
  // interface status, for observation
  output logic        fpu_busy,
  output logic        fpu_except,
  output logic        fpu_new_instr,
  output logic        fpu_suspend,
  output logic        fpu_parallel,
  output logic        fpu_enable
);
  logic       fpu_brtf;
  logic [6:0] fpu_opcode;
  logic [4:0] fpu_rs1, fpu_rs2, fpu_rd;

  data_valid u_cpu_dv (
    .data_may_be_valid, .proc_tag_match, .data_is_valid,
    .valid(cpu_data_valid)
  );

  cpu_fpu_if u_cpu_if (
    .clk, .rst,
    .upsw_we, .upsw_parallel, .upsw_enable, .fpu_parallel, .fpu_enable,
    .cpu_valid, .cpu_instr, .cpu_pc, .core_susp, .trap_mask,
    .cpu_issue, .fpu_stall, .emul_trap, .exc_trap, .fpu_pc, .brtf,
    .fpu_new_instr, .fpu_opcode, .fpu_rs1, .fpu_rs2, .fpu_rd, .fpu_suspend,
    .fpu_busy, .fpu_except, .fpu_brtf
  );

  fpu_chip u_fpu (
    .clk, .rst,
    .fpu_new_instr, .fpu_opcode, .fpu_rs1, .fpu_rs2, .fpu_rd, .fpu_suspend,
    .fpu_busy, .fpu_except, .fpu_brtf,
    .data_may_be_valid, .proc_tag_match, .data_is_valid,
    .ld_data, .st_data, .st_data_oe
  );
endmodule
