// fpu_eu: the FPU execution unit sequencer.
//
// Runs one operation at a time (FADD, FSUB, FMUL, FDIV, FABS, FNEG, FCMP, CVTS, CVTD) for the
// number of execution cycles of Table 2, followed by one register-write cycle. Operands are
// captured from register file port A when the operation starts; the arithmetic itself is the
// combinational fpu_arith datapath.
//
// Timing (one clock edge per SPUR cycle): an operation started at edge t occupies cycles
// Ex1..ExN after t. fpuBusy is high during Ex1..ExN and low in the write cycle that follows,
// as the description requires (asserted from Ex1, deasserted in the register write cycle). The
// result, the Fpsw flags and the compare bit are committed at the edge that ends ExN, so
// fpuExcept and fpuBrT_F are visible in the write cycle. The unit accepts a new operation at
// any edge where it is not in Ex1..ExN, so a waiting operation starts in the cycle after the
// write cycle.
//
// Two controls come from the interface control unit:
//   blk  - the commit of the operation tagged blk_seq must not happen at this edge (the CPU is
//          suspended and this operation was issued after the instruction that caused the
//          suspension). The unit then stays in ExN with fpuBusy high (a "NoWr" cycle) and
//          commits at the first edge where blk is low.
//   kill - the operation tagged kill_seq is cancelled (TRAP_CALL): nothing is written and the
//          unit returns to idle.
// Register specifiers 15 and above are not written by this unit.
module fpu_eu
  import spur_fpu_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  // start of an operation
  input  logic       start,
  input  instr_t     start_instr,
  input  seq_t       start_seq,
  input  fpreg_t     opa,          // register file port A, read at the start edge
  input  fpreg_t     opb,
  output logic       accept,       // a start at this edge is taken
  // control from the interface control unit
  input  logic       blk,
  input  seq_t       blk_seq,
  input  logic       kill,
  input  seq_t       kill_seq,
  // state
  output logic       busy,         // fpuBusy_C4
  output logic       active,       // an operation is in Ex1..ExN
  output seq_t       cur_seq,
  output logic       stalled,      // commit blocked at this edge (NoWr)
  // commit to register file port A
  output logic       rf_we,
  output logic [4:0] rf_wa,
  output fpreg_t     rf_wd,
  // commit to the Fpsw
  output logic       commit,
  output logic [3:0] commit_flags,
  output logic       commit_is_cmp,
  output logic       commit_cc
);
  typedef enum logic [1:0] {S_IDLE, S_EXEC, S_WR} state_e;

  state_e     state;
  logic [4:0] cnt;
  instr_t     cur;
  fpreg_t     a_q, b_q;

  fpreg_t     res;
  logic       res_we;
  logic [3:0] res_flags;
  logic       res_cc;

  fpu_arith u_arith (
    .op        (cur.opcode),
    .cond      (cur.rd[2:0]),
    .a         (a_q),
    .b         (b_q),
    .result    (res),
    .writes_reg(res_we),
    .flags     (res_flags),
    .cc        (res_cc)
  );

  logic last_cycle, killed;

  always_comb begin
    busy       = state == S_EXEC;
    active     = busy;
    accept     = state != S_EXEC;
    last_cycle = state == S_EXEC && cnt == 5'd1;
    killed     = kill && state == S_EXEC && kill_seq == cur_seq;
    stalled    = last_cycle && !killed && blk && blk_seq == cur_seq;
    commit     = last_cycle && !killed && !stalled;
    commit_flags  = res_flags;
    commit_is_cmp = cur.opcode == OP_FCMP;
    commit_cc     = res_cc;
    rf_we = commit && res_we && 32'(cur.rd) < NREGS;
    rf_wa = cur.rd;
    rf_wd = res;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      cnt     <= '0;
      cur     <= '0;
      cur_seq <= '0;
      a_q     <= '0;
      b_q     <= '0;
    end else begin
      case (state)
        S_EXEC: begin
          if (killed)          state <= S_IDLE;
          else if (!last_cycle) cnt <= cnt - 5'd1;
          else if (commit)      state <= S_WR;
        end
        default: begin
          if (start) begin
            state   <= S_EXEC;
            cnt     <= exec_cycles(start_instr.opcode);
            cur     <= start_instr;
            cur_seq <= start_seq;
            a_q     <= opa;
            b_q     <= opb;
          end else begin
            state <= S_IDLE;
          end
        end
      endcase
    end
  end

  // A start is only offered when the unit can take it.
  assert property (@(posedge clk) disable iff (rst) start |-> accept)
    else $error("fpu_eu: operation started while the execution unit is busy");
endmodule
