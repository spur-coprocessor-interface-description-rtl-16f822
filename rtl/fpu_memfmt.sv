// fpu_memfmt: converts between 64-bit memory words and the 87-bit FPU register format.
//
// The data path between the cache and the FPU is 64 bits wide, so a double is moved in one
// cycle. LD_SGL/ST_SGL move an IEEE single in bits [31:0] of the word, LD_DBL/ST_DBL an IEEE
// double. An 87-bit register is saved and restored exactly with two words: the EXT1 form
// carries {sign, exponent, round tag, data type} in bits [22:0] and the EXT2 form the 64-bit
// fraction. Loads produce per-field write enables for the register file (EXT1 writes only the
// upper fields, EXT2 only the fraction). Conversion on load tags zeros, infinities, NaNs and
// denormals; on store, values outside the single or double exponent range become infinity or
// zero without raising an exception (Table 4 lists no exceptions for loads and stores), and
// the fraction is truncated. The description names the four word forms but does not define
// them; the layouts and conversion rules here are this design's choices. Purely combinational.
module fpu_memfmt
  import spur_fpu_pkg::*;
(
  // load direction
  input  memfmt_e     ld_fmt,
  input  logic [63:0] ld_word,
  output fpreg_t      ld_reg,
  output logic        ld_we_hi,
  output logic        ld_we_frac,
  // store direction
  input  memfmt_e     st_fmt,
  input  fpreg_t      st_reg,
  output logic [63:0] st_word
);
  localparam int SGL_BIAS = 127;
  localparam int DBL_BIAS = 1023;

  always_comb begin
    logic        s;
    logic [10:0] e;
    logic [51:0] f;
    int          emax;
    ld_reg     = '0;
    ld_we_hi   = 1'b1;
    ld_we_frac = 1'b1;
    s = 1'b0; e = '0; f = '0; emax = 0;
    case (ld_fmt)
      MF_SGL, MF_DBL: begin
        if (ld_fmt == MF_SGL) begin
          s = ld_word[31]; e = {3'd0, ld_word[30:23]}; f = {ld_word[22:0], 29'd0};
          emax = 255;
        end else begin
          s = ld_word[63]; e = ld_word[62:52]; f = ld_word[51:0];
          emax = 2047;
        end
        ld_reg.sign = s;
        if (e == '0 && f == '0) begin
          ld_reg.dtype = DT_ZERO;
        end else if (32'(e) == emax) begin
          ld_reg.dtype = (f == '0) ? DT_INF : DT_NAN;
          ld_reg.exp   = '1;
          ld_reg.frac  = {1'b1, f, 11'd0};
        end else if (e == '0) begin
          ld_reg.dtype = DT_DENORM;
          ld_reg.exp   = EXP_W'(EXP_BIAS + 1 - ((ld_fmt == MF_SGL) ? SGL_BIAS : DBL_BIAS));
          ld_reg.frac  = {1'b0, f, 11'd0};
        end else begin
          ld_reg.dtype = (ld_fmt == MF_SGL) ? DT_SGL : DT_DBL;
          ld_reg.exp   = EXP_W'(EXP_BIAS + 32'(e) - ((ld_fmt == MF_SGL) ? SGL_BIAS : DBL_BIAS));
          ld_reg.frac  = {1'b1, f, 11'd0};
        end
      end
      MF_EXT1: begin
        ld_reg.sign  = ld_word[22];
        ld_reg.exp   = ld_word[21:5];
        ld_reg.rtag  = ld_word[4:3];
        ld_reg.dtype = dtype_e'(ld_word[2:0]);
        ld_we_frac   = 1'b0;
      end
      default: begin   // MF_EXT2
        ld_reg.frac = ld_word;
        ld_we_hi    = 1'b0;
      end
    endcase
  end

  always_comb begin
    int          ue;
    logic [7:0]  es;
    logic [10:0] ed;
    st_word = '0;
    ue = int'(st_reg.exp) - EXP_BIAS;
    es = '0; ed = '0;
    case (st_fmt)
      MF_SGL: begin
        st_word[31] = st_reg.sign;
        unique case (st_reg.dtype)
          DT_ZERO:   es = '0;
          DT_INF:    es = '1;
          DT_NAN:    begin es = '1; st_word[22:0] = {1'b1, st_reg.frac[61:40]}; end
          DT_DENORM: begin es = '0; st_word[22:0] = st_reg.frac[62:40]; end
          default: begin
            if (ue > SGL_BIAS)        es = '1;
            else if (ue < 1 - SGL_BIAS) es = '0;
            else begin
              es = 8'(ue + SGL_BIAS);
              st_word[22:0] = st_reg.frac[62:40];
            end
          end
        endcase
        st_word[30:23] = es;
      end
      MF_DBL: begin
        st_word[63] = st_reg.sign;
        unique case (st_reg.dtype)
          DT_ZERO:   ed = '0;
          DT_INF:    ed = '1;
          DT_NAN:    begin ed = '1; st_word[51:0] = {1'b1, st_reg.frac[61:11]}; end
          DT_DENORM: begin ed = '0; st_word[51:0] = st_reg.frac[62:11]; end
          default: begin
            if (ue > DBL_BIAS)        ed = '1;
            else if (ue < 1 - DBL_BIAS) ed = '0;
            else begin
              ed = 11'(ue + DBL_BIAS);
              st_word[51:0] = st_reg.frac[62:11];
            end
          end
        endcase
        st_word[62:52] = ed;
      end
      MF_EXT1: st_word[22:0] = {st_reg.sign, st_reg.exp, st_reg.rtag, st_reg.dtype};
      default: st_word = st_reg.frac;
    endcase
  end
endmodule
