// spur_fpu_pkg: types and constants shared by the SPUR CPU-FPU coprocessor interface.
//
// The operand register format, the 22-bit instruction fragment broadcast to coprocessors
// (7-bit opcode and three 5-bit register specifiers) and the execution cycle counts of the
// arithmetic operations follow the interface description. The numeric opcode values, the
// data type tag codes, the exponent bias and the Fpsw bit layout are this design's own
// choices: the description names the instructions and fields but gives no encodings.
//
// Timing convention used by every module: one clock edge per SPUR cycle (the four
// non-overlapping phases are folded into the cycle). A signal the sender drives in some phase
// of cycle c is sampled by the receiver at the clock edge that ends cycle c.
package spur_fpu_pkg;

  // ---------------------------------------------------------------------------------------
  // Operand register: 1 sign, 17 exponent, 64 fraction, 2 round tag, 3 data type = 87 bits
  // ---------------------------------------------------------------------------------------
  localparam int unsigned EXP_W  = 17;
  localparam int unsigned FRAC_W = 64;
  localparam int unsigned REG_W  = 1 + EXP_W + FRAC_W + 2 + 3;   // 87
  localparam int unsigned EXP_BIAS = 65535;                      // 2^16 - 1

  // Data type tag (own encoding). Normal numbers carry their precision.
  typedef enum logic [2:0] {
    DT_ZERO   = 3'd0,
    DT_SGL    = 3'd1,
    DT_DBL    = 3'd2,
    DT_EXT    = 3'd3,
    DT_INF    = 3'd4,
    DT_NAN    = 3'd5,
    DT_DENORM = 3'd6
  } dtype_e;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;    // biased by EXP_BIAS; fraction has an explicit leading one
    logic [FRAC_W-1:0] frac;
    logic [1:0]        rtag;   // round tag, carried through unchanged by this design
    dtype_e            dtype;
  } fpreg_t;

  localparam int unsigned NREGS = 15;   // operand registers R0..R14
  localparam logic [4:0]  FPSW_SPEC = 5'd15;   // register specifier that names the Fpsw

  // ---------------------------------------------------------------------------------------
  // Instruction fragment broadcast on fpuOPCODE_CV3, fpuRS1_CV3, fpuRS2_CV3, fpuRD_CV3
  // ---------------------------------------------------------------------------------------
  typedef struct packed {
    logic [6:0] opcode;
    logic [4:0] rs1;
    logic [4:0] rs2;
    logic [4:0] rd;
  } instr_t;   // 22 bits

  // Opcodes (own encoding). Every other value is a CPU instruction the FPU ignores.
  localparam logic [6:0] OP_FADD      = 7'h40;
  localparam logic [6:0] OP_FSUB      = 7'h41;
  localparam logic [6:0] OP_FMUL      = 7'h42;
  localparam logic [6:0] OP_FDIV      = 7'h43;
  localparam logic [6:0] OP_FABS      = 7'h44;
  localparam logic [6:0] OP_FNEG      = 7'h45;
  localparam logic [6:0] OP_FCMP      = 7'h46;
  localparam logic [6:0] OP_CVTS      = 7'h47;
  localparam logic [6:0] OP_CVTD      = 7'h48;
  localparam logic [6:0] OP_FMOV      = 7'h49;
  localparam logic [6:0] OP_SYNC      = 7'h4A;
  localparam logic [6:0] OP_LD_SGL    = 7'h50;
  localparam logic [6:0] OP_LD_SGL_RO = 7'h51;
  localparam logic [6:0] OP_LD_DBL    = 7'h52;
  localparam logic [6:0] OP_LD_DBL_RO = 7'h53;
  localparam logic [6:0] OP_LD_EXT1   = 7'h54;
  localparam logic [6:0] OP_LD_EXT1_RO= 7'h55;
  localparam logic [6:0] OP_LD_EXT2   = 7'h56;
  localparam logic [6:0] OP_LD_EXT2_RO= 7'h57;
  localparam logic [6:0] OP_ST_SGL    = 7'h58;
  localparam logic [6:0] OP_ST_DBL    = 7'h59;
  localparam logic [6:0] OP_ST_EXT1   = 7'h5A;
  localparam logic [6:0] OP_ST_EXT2   = 7'h5B;
  // CPU-internal instructions the FPU must recognise
  localparam logic [6:0] OP_READ_PC   = 7'h7C;
  localparam logic [6:0] OP_MISS      = 7'h7D;
  localparam logic [6:0] OP_TRAP_CALL = 7'h7E;

  typedef enum logic [2:0] {
    CL_CPU,      // not for the FPU (includes MISS and READ_PC)
    CL_EU,       // arithmetic, compare, convert, abs, neg: execution unit
    CL_LOAD,     // FPU load from memory
    CL_STORE,    // FPU store to memory
    CL_MOVE,     // FMOV register to register
    CL_SYNC,     // busy test, handled by the CPU
    CL_TRAP      // internal TRAP_CALL
  } iclass_e;

  // Memory word formats for loads and stores
  typedef enum logic [1:0] {MF_SGL, MF_DBL, MF_EXT1, MF_EXT2} memfmt_e;

  function automatic iclass_e classify(input logic [6:0] op);
    case (op)
      OP_FADD, OP_FSUB, OP_FMUL, OP_FDIV, OP_FABS, OP_FNEG,
      OP_FCMP, OP_CVTS, OP_CVTD:                               return CL_EU;
      OP_LD_SGL, OP_LD_SGL_RO, OP_LD_DBL, OP_LD_DBL_RO,
      OP_LD_EXT1, OP_LD_EXT1_RO, OP_LD_EXT2, OP_LD_EXT2_RO:    return CL_LOAD;
      OP_ST_SGL, OP_ST_DBL, OP_ST_EXT1, OP_ST_EXT2:            return CL_STORE;
      OP_FMOV:                                                 return CL_MOVE;
      OP_SYNC:                                                 return CL_SYNC;
      OP_TRAP_CALL:                                            return CL_TRAP;
      default:                                                 return CL_CPU;
    endcase
  endfunction

  // Word format of a load or store opcode
  function automatic memfmt_e mem_format(input logic [6:0] op);
    case (op)
      OP_LD_SGL, OP_LD_SGL_RO, OP_ST_SGL:    return MF_SGL;
      OP_LD_DBL, OP_LD_DBL_RO, OP_ST_DBL:    return MF_DBL;
      OP_LD_EXT1, OP_LD_EXT1_RO, OP_ST_EXT1: return MF_EXT1;
      default:                               return MF_EXT2;
    endcase
  endfunction

  // True for the operations that can raise an exception (Table 4): the CPU keeps
  // their address in FpuPC.
  function automatic logic can_except(input logic [6:0] op);
    return op inside {OP_FADD, OP_FSUB, OP_FMUL, OP_FDIV, OP_FCMP, OP_CVTS, OP_CVTD};
  endfunction

  // ---------------------------------------------------------------------------------------
  // Execution cycles (operation only, the register-write cycle follows) - Table 2
  // ---------------------------------------------------------------------------------------
  localparam int unsigned CYC_FADD = 3;
  localparam int unsigned CYC_FSUB = 3;
  localparam int unsigned CYC_FMUL = 8;
  localparam int unsigned CYC_FDIV = 20;
  localparam int unsigned CYC_FABS = 3;
  localparam int unsigned CYC_FNEG = 3;
  localparam int unsigned CYC_FCMP = 3;
  localparam int unsigned CYC_CVTS = 3;
  localparam int unsigned CYC_CVTD = 3;

  function automatic logic [4:0] exec_cycles(input logic [6:0] op);
    case (op)
      OP_FMUL: return 5'(CYC_FMUL);
      OP_FDIV: return 5'(CYC_FDIV);
      OP_FADD: return 5'(CYC_FADD);
      OP_FSUB: return 5'(CYC_FSUB);
      OP_FABS: return 5'(CYC_FABS);
      OP_FNEG: return 5'(CYC_FNEG);
      OP_FCMP: return 5'(CYC_FCMP);
      OP_CVTS: return 5'(CYC_CVTS);
      default: return 5'(CYC_CVTD);
    endcase
  endfunction

  // ---------------------------------------------------------------------------------------
  // Fpsw layout (own choice; nominally 64 bits, unused bits read as zero)
  //   [3:0] sticky exception flags, [7:4] trap enables, [8] compare result (fpuBrT_F)
  // ---------------------------------------------------------------------------------------
  localparam int unsigned EXC_OPERAND   = 0;
  localparam int unsigned EXC_OVERFLOW  = 1;
  localparam int unsigned EXC_UNDERFLOW = 2;
  localparam int unsigned EXC_INEXACT   = 3;
  localparam logic [3:0]  FPSW_EN_RESET = 4'b0111;   // inexact does not trap after reset

  // FCMP condition codes carried in the Rd field (own encoding)
  localparam logic [2:0] CC_EQ = 3'd0, CC_NE = 3'd1, CC_LT = 3'd2, CC_LE = 3'd3,
                         CC_GT = 3'd4, CC_GE = 3'd5, CC_UN = 3'd6, CC_OR = 3'd7;

  // Sequence tag given to every received instruction, used to find the one to kill
  typedef logic [5:0] seq_t;

endpackage
