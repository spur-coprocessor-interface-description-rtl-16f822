// fpu_fpsw: the FPU control/status word (Fpsw).
//
// Holds the result of the last FCMP, which is driven continuously to the CPU as fpuBrT_F_C4,
// four sticky exception flags (operand trap, result overflow, result underflow, result
// inexact, the exceptions of Table 4) and one trap-enable bit per flag. fpuExcept_C4 is
// asserted while any enabled flag is set and stays asserted until software rewrites the Fpsw
// (a load to register specifier 15). Flags and the compare bit change at the edge where the
// execution unit commits an operation, so fpuExcept and fpuBrT_F are seen by the CPU in the
// write cycle of the operation, as in the description. The bit layout (see spur_fpu_pkg), the
// enables and their reset value are this design's choices. The word is nominally 64 bits wide;
// only bits [8:0] are defined, so the upper 55 bits of sw_rdata are constant zero.
module fpu_fpsw
  import spur_fpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // commit of an execution unit operation
  input  logic        commit,
  input  logic [3:0]  commit_flags,
  input  logic        commit_is_cmp,
  input  logic        commit_cc,
  // software access through loads and stores of specifier 15
  input  logic        sw_we,
  input  logic [63:0] sw_wdata,
  output logic [63:0] sw_rdata,
  // status to the CPU
  output logic        fpu_except,    // fpuExcept_C4
  output logic        fpu_brtf       // fpuBrT_F_C4
);
  logic [3:0] flags, enables;
  logic       cc;

  always_ff @(posedge clk) begin
    if (rst) begin
      flags   <= '0;
      enables <= FPSW_EN_RESET;
      cc      <= 1'b0;
    end else if (sw_we) begin
      flags   <= sw_wdata[3:0];
      enables <= sw_wdata[7:4];
      cc      <= sw_wdata[8];
    end else if (commit) begin
      flags <= flags | commit_flags;
      if (commit_is_cmp) cc <= commit_cc;
    end
  end

  always_comb begin
    sw_rdata   = {55'd0, cc, enables, flags};
    fpu_except = |(flags & enables);
    fpu_brtf   = cc;
  end
endmodule
