// fpu_regfile: the FPU operand register file, 15 registers of 87 bits, dual ported.
//
// Port A serves the execution unit (two reads, one write); port B serves loads, stores and
// FMOV (one read, one write), so memory transfers proceed while an arithmetic operation runs.
// Port B writes may update only part of a register: the upper fields (sign, exponent, round
// tag, data type) and the fraction have separate enables, which the two halves of an
// extended-precision load use. Reads are combinational and see the value before any write
// at the same edge: there is no forwarding, as in the description. Writes occur at the clock
// edge. Specifiers of NREGS and above read as zero and are not written. When both ports write
// the same field of the same register at one edge, port B (the more recently issued memory
// transfer or move) wins; this ordering is this design's choice.
module fpu_regfile
  import spur_fpu_pkg::*;
#(
  parameter int unsigned N = NREGS
) (
  input  logic       clk,
  input  logic [4:0] a_rs1,
  input  logic [4:0] a_rs2,
  output fpreg_t     a_rd1,
  output fpreg_t     a_rd2,
  input  logic       a_we,
  input  logic [4:0] a_wa,
  input  fpreg_t     a_wd,
  input  logic [4:0] b_rs,
  output fpreg_t     b_rd,
  input  logic       b_we_hi,     // write sign, exponent, round tag and data type
  input  logic       b_we_frac,   // write fraction
  input  logic [4:0] b_wa,
  input  fpreg_t     b_wd
);
  fpreg_t regs [N];

  function automatic fpreg_t rd(input logic [4:0] a);
    if (32'(a) < N) return regs[a[$clog2(N)-1:0]];
    return '0;
  endfunction

  always_comb begin
    a_rd1 = rd(a_rs1);
    a_rd2 = rd(a_rs2);
    b_rd  = rd(b_rs);
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      logic bh, bf;
      bh = b_we_hi   && 32'(b_wa) == i;
      bf = b_we_frac && 32'(b_wa) == i;
      if (a_we && 32'(a_wa) == i) begin
        if (!bh) begin
          regs[i].sign  <= a_wd.sign;
          regs[i].exp   <= a_wd.exp;
          regs[i].rtag  <= a_wd.rtag;
          regs[i].dtype <= a_wd.dtype;
        end
        if (!bf) regs[i].frac <= a_wd.frac;
      end
      if (bh) begin
        regs[i].sign  <= b_wd.sign;
        regs[i].exp   <= b_wd.exp;
        regs[i].rtag  <= b_wd.rtag;
        regs[i].dtype <= b_wd.dtype;
      end
      if (bf) regs[i].frac <= b_wd.frac;
    end
  end
endmodule
