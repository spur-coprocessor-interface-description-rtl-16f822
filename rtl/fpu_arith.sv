// fpu_arith: combinational datapath of the FPU execution unit.
//
// Computes the result of one execution unit operation (FADD, FSUB, FMUL, FDIV, FABS, FNEG,
// FCMP, CVTS, CVTD) on 87-bit register operands and reports the exceptions of Table 4:
// operand trap, result overflow, result underflow, result inexact. The description leaves the
// arithmetic algorithms to a separate document, so the numerics here are this design's own
// and deliberately simple:
//   * significands have an explicit leading one; results are normalised and truncated (round
//     toward zero) to the precision of the wider operand (single 24, double 53, extended 64
//     bits); any discarded bit sets inexact;
//   * results beyond the exponent range of that precision become infinity (overflow) or zero
//     (underflow); denormals are not produced;
//   * NaN and denormal operands, inf-inf, 0*inf, x/0 and inf/inf raise the operand trap and
//     give a NaN;
//   * FCMP evaluates the condition in the Rd field (see spur_fpu_pkg) and writes no register;
//     an unordered compare (NaN or denormal operand) raises the operand trap;
//   * FABS and FNEG only change the sign and raise nothing, as Table 4 requires.
// The round tag is carried from the first operand and otherwise unused.
module fpu_arith
  import spur_fpu_pkg::*;
(
  input  logic [6:0] op,
  input  logic [2:0] cond,      // FCMP condition (Rd field)
  input  fpreg_t     a,         // Rs1
  input  fpreg_t     b,         // Rs2
  output fpreg_t     result,
  output logic       writes_reg,
  output logic [3:0] flags,     // {inexact, underflow, overflow, operand}
  output logic       cc         // FCMP result
);
  typedef logic signed [19:0] sexp_t;

  function automatic logic is_num(input fpreg_t x);
    return x.dtype inside {DT_SGL, DT_DBL, DT_EXT};
  endfunction

  function automatic logic is_bad(input fpreg_t x);
    return x.dtype inside {DT_NAN, DT_DENORM} || x.dtype > DT_DENORM;
  endfunction

  function automatic logic [1:0] prec_of(input fpreg_t x);
    case (x.dtype)
      DT_DBL:  return 2'd1;
      DT_EXT:  return 2'd2;
      default: return 2'd0;
    endcase
  endfunction

  function automatic dtype_e dt_of(input logic [1:0] p);
    case (p)
      2'd1:    return DT_DBL;
      2'd2:    return DT_EXT;
      default: return DT_SGL;
    endcase
  endfunction

  function automatic sexp_t unb(input fpreg_t x);
    return sexp_t'({3'b000, x.exp}) - sexp_t'(EXP_BIAS);
  endfunction

  function automatic fpreg_t special(input logic s, input dtype_e t);
    fpreg_t r;
    r = '0;
    r.sign  = s;
    r.dtype = t;
    if (t == DT_INF || t == DT_NAN) r.exp = '1;
    if (t == DT_NAN) r.frac = {2'b11, 62'd0};
    return r;
  endfunction

  // Normalise a magnitude m whose value is m * 2^(e - 127), truncate it to precision p and
  // range-check it. Returns the result; flags through the output argument.
  function automatic fpreg_t norm_round(input logic s, input logic [129:0] m,
                                        input logic sticky_in, input sexp_t e,
                                        input logic [1:0] p, output logic [3:0] fl);
    fpreg_t          r;
    int              lead;
    logic [129:0]    sh;
    logic [63:0]     mant, keep_mask;
    logic            lost;
    sexp_t           ue, emin, emax;
    fl   = '0;
    lead = -1;
    for (int i = 0; i < 130; i++) if (m[i]) lead = i;
    if (lead < 0) begin
      fl[EXC_INEXACT] = sticky_in;
      return special(s, DT_ZERO);
    end
    sh   = m << (129 - lead);
    mant = sh[129:66];
    lost = sticky_in || (sh[65:0] != '0);
    case (p)
      2'd0:    begin keep_mask = {{24{1'b1}}, 40'd0}; emin = -126;   emax = 127;   end
      2'd1:    begin keep_mask = {{53{1'b1}}, 11'd0}; emin = -1022;  emax = 1023;  end
      default: begin keep_mask = '1;                  emin = -16382; emax = 16383; end
    endcase
    lost = lost || ((mant & ~keep_mask) != '0);
    mant = mant & keep_mask;
    ue   = e + sexp_t'(lead - 127);
    if (ue > emax) begin
      fl[EXC_OVERFLOW] = 1'b1;
      fl[EXC_INEXACT]  = 1'b1;
      return special(s, DT_INF);
    end
    if (ue < emin) begin
      fl[EXC_UNDERFLOW] = 1'b1;
      fl[EXC_INEXACT]   = 1'b1;
      return special(s, DT_ZERO);
    end
    fl[EXC_INEXACT] = lost;
    r       = '0;
    r.sign  = s;
    r.exp   = EXP_W'(ue + sexp_t'(EXP_BIAS));
    r.frac  = mant;
    r.dtype = dt_of(p);
    return r;
  endfunction

  always_comb begin
    logic [1:0]   p;
    logic         sa, sb, eff_sub, bad, op_trap;
    sexp_t        ea, eb, d;
    logic [127:0] xm, ym, yfull;
    logic [128:0] sum;
    logic         st;
    logic [127:0] prod;
    logic [191:0] num, quo, rem;
    logic [3:0]   fl;
    logic         lt, eq, gt, un;
    fpreg_t       x, y;
    logic [1:0]   ka, kb;
    logic         mag_lt, mag_eq, sx;
    sexp_t        ex;

    result     = a;
    writes_reg = 1'b1;
    flags      = '0;
    cc         = 1'b0;
    p   = (prec_of(a) > prec_of(b)) ? prec_of(a) : prec_of(b);
    sa  = a.sign;
    sb  = b.sign ^ (op == OP_FSUB);
    bad = is_bad(a) || ((op inside {OP_FADD, OP_FSUB, OP_FMUL, OP_FDIV, OP_FCMP}) && is_bad(b));
    ea  = unb(a);
    eb  = unb(b);
    op_trap = 1'b0;
    xm = '0; ym = '0; yfull = '0; sum = '0; st = 1'b0; prod = '0; num = '0; quo = '0; rem = '0;
    fl = '0; lt = 1'b0; eq = 1'b0; gt = 1'b0; un = 1'b0; x = a; y = b; eff_sub = 1'b0; d = '0;
    ka = '0; kb = '0; mag_lt = 1'b0; mag_eq = 1'b0; sx = 1'b0; ex = '0;

    case (op)
      OP_FABS: result.sign = 1'b0;
      OP_FNEG: result.sign = ~a.sign;

      OP_FCMP: begin
        writes_reg = 1'b0;
        if (bad) begin
          un = 1'b1;
          op_trap = 1'b1;
        end else begin
          // magnitude order: zero < numbers (by exponent, then fraction) < infinity
          ka = (a.dtype == DT_ZERO) ? 2'd0 : (a.dtype == DT_INF) ? 2'd2 : 2'd1;
          kb = (b.dtype == DT_ZERO) ? 2'd0 : (b.dtype == DT_INF) ? 2'd2 : 2'd1;
          if (ka != kb) begin
            mag_lt = ka < kb; mag_eq = 1'b0;
          end else if (ka == 2'd1) begin
            mag_lt = {a.exp, a.frac} < {b.exp, b.frac};
            mag_eq = {a.exp, a.frac} == {b.exp, b.frac};
          end else begin
            mag_lt = 1'b0; mag_eq = 1'b1;
          end
          if (ka == 2'd0 && kb == 2'd0) eq = 1'b1;
          else if (mag_eq && a.sign == b.sign) eq = 1'b1;
          else if (ka == 2'd0)      lt = !b.sign;               // 0 vs nonzero b
          else if (kb == 2'd0)      lt = a.sign;                // nonzero a vs 0
          else if (a.sign != b.sign) lt = a.sign;
          else                       lt = a.sign ? (!mag_lt && !mag_eq) : mag_lt;
          gt = !lt && !eq;
        end
        case (cond)
          CC_EQ: cc = eq;
          CC_NE: cc = !eq;
          CC_LT: cc = lt;
          CC_LE: cc = lt || eq;
          CC_GT: cc = gt;
          CC_GE: cc = gt || eq;
          CC_UN: cc = un;
          default: cc = !un;
        endcase
      end

      OP_CVTS, OP_CVTD: begin
        if (bad) begin
          op_trap = 1'b1;
          result  = special(a.sign, DT_NAN);
        end else if (is_num(a)) begin
          result = norm_round(a.sign, {2'b00, a.frac, 64'd0}, 1'b0, ea,
                              (op == OP_CVTS) ? 2'd0 : 2'd1, fl);
          flags  = fl;
        end
        result.rtag = a.rtag;
      end

      OP_FADD, OP_FSUB: begin
        eff_sub = sa ^ sb;
        if (bad || (a.dtype == DT_INF && b.dtype == DT_INF && eff_sub)) begin
          op_trap = 1'b1;
          result  = special(1'b0, DT_NAN);
        end else if (a.dtype == DT_INF) begin
          result = special(sa, DT_INF);
        end else if (b.dtype == DT_INF) begin
          result = special(sb, DT_INF);
        end else if (a.dtype == DT_ZERO && b.dtype == DT_ZERO) begin
          result = special(sa & sb, DT_ZERO);
        end else if (a.dtype == DT_ZERO) begin
          result = b; result.sign = sb;
        end else if (b.dtype == DT_ZERO) begin
          result = a;
        end else begin
          // x is the operand of larger magnitude; the result takes its sign
          if ({a.exp, a.frac} >= {b.exp, b.frac}) begin
            x = a; y = b; sx = sa; ex = ea; d = ea - eb;
          end else begin
            x = b; y = a; sx = sb; ex = eb; d = eb - ea;
          end
          xm    = {x.frac, 64'd0};
          yfull = {y.frac, 64'd0};
          if (d >= 128) begin
            ym = '0;
            st = y.frac != '0;
          end else begin
            ym = yfull >> d;
            st = (yfull & ((128'd1 << d) - 128'd1)) != '0;
          end
          if (eff_sub) sum = {1'b0, xm} - {1'b0, ym} - {128'd0, st};
          else         sum = {1'b0, xm} + {1'b0, ym};
          result = norm_round(sx, {1'b0, sum}, st, ex, p, fl);
          if (sum == '0 && !st) result = special(1'b0, DT_ZERO);
          flags = fl;
        end
        result.rtag = a.rtag;
      end

      OP_FMUL: begin
        if (bad || (a.dtype == DT_INF && b.dtype == DT_ZERO) ||
                   (a.dtype == DT_ZERO && b.dtype == DT_INF)) begin
          op_trap = 1'b1;
          result  = special(1'b0, DT_NAN);
        end else if (a.dtype == DT_INF || b.dtype == DT_INF) begin
          result = special(a.sign ^ b.sign, DT_INF);
        end else if (a.dtype == DT_ZERO || b.dtype == DT_ZERO) begin
          result = special(a.sign ^ b.sign, DT_ZERO);
        end else begin
          prod   = a.frac * b.frac;
          result = norm_round(a.sign ^ b.sign, {2'b00, prod}, 1'b0, ea + eb + 1, p, fl);
          flags  = fl;
        end
        result.rtag = a.rtag;
      end

      OP_FDIV: begin
        if (bad || b.dtype == DT_ZERO || (a.dtype == DT_INF && b.dtype == DT_INF)) begin
          op_trap = 1'b1;
          result  = special(1'b0, DT_NAN);
        end else if (a.dtype == DT_INF) begin
          result = special(a.sign ^ b.sign, DT_INF);
        end else if (a.dtype == DT_ZERO || b.dtype == DT_INF) begin
          result = special(a.sign ^ b.sign, DT_ZERO);
        end else begin
          num    = {a.frac, 128'd0};
          quo    = num / {128'd0, b.frac};
          rem    = num % {128'd0, b.frac};
          result = norm_round(a.sign ^ b.sign, quo[129:0], rem != '0, ea - eb - 1, p, fl);
          flags  = fl;
        end
        result.rtag = a.rtag;
      end

      default: ;
    endcase
    if (op_trap) flags[EXC_OPERAND] = 1'b1;
  end
endmodule
