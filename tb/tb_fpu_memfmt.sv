// tb_fpu_memfmt: converts IEEE single and double words to the register format and back, and
// checks the expected register fields worked out by hand (1.5 single: exponent = bias,
// fraction 0xC000...; -2.0 double: exponent = bias+1), the tagging of zero, infinity, NaN and
// denormal, the two extended halves, per-field write enables, and store range limits.
module tb_fpu_memfmt;
  import spur_fpu_pkg::*;
  memfmt_e ld_fmt, st_fmt;
  logic [63:0] ld_word, st_word;
  fpreg_t ld_reg, st_reg;
  logic ld_we_hi, ld_we_frac;
  int checks = 0, failures = 0;

  fpu_memfmt dut (.*);

  task automatic chk(input logic [127:0] got, input logic [127:0] exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp_v);
    end
  endtask

  task automatic ld(input memfmt_e f, input logic [63:0] w);
    ld_fmt = f; ld_word = w; #1;
  endtask

  task automatic st(input memfmt_e f, input fpreg_t r);
    st_fmt = f; st_reg = r; #1;
  endtask

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // single 1.5 = 0x3FC00000
    ld(MF_SGL, 64'h3FC0_0000);
    chk(ld_reg.sign, 0, "1.5 sign");
    chk(ld_reg.exp, 65535, "1.5 exponent");
    chk(ld_reg.frac, 64'hC000_0000_0000_0000, "1.5 fraction");
    chk(ld_reg.dtype, DT_SGL, "1.5 type");
    chk({ld_we_hi, ld_we_frac}, 2'b11, "single writes all");
    st(MF_SGL, ld_reg); chk(st_word, 64'h3FC0_0000, "1.5 round trip");
    // double -2.0 = 0xC000000000000000
    ld(MF_DBL, 64'hC000_0000_0000_0000);
    chk(ld_reg.sign, 1, "-2 sign");
    chk(ld_reg.exp, 65536, "-2 exponent");
    chk(ld_reg.frac, 64'h8000_0000_0000_0000, "-2 fraction");
    chk(ld_reg.dtype, DT_DBL, "-2 type");
    st(MF_DBL, ld_reg); chk(st_word, 64'hC000_0000_0000_0000, "-2 round trip");
    // double pi
    ld(MF_DBL, 64'h4009_21FB_5444_2D18);
    st(MF_DBL, ld_reg); chk(st_word, 64'h4009_21FB_5444_2D18, "pi round trip");
    // store of the double value as single truncates: pi single (truncated) = 0x40490FDA
    st(MF_SGL, ld_reg); chk(st_word, 64'h4049_0FDA, "pi to single");
    // special values
    ld(MF_SGL, 64'h8000_0000); chk(ld_reg.dtype, DT_ZERO, "-0 type"); chk(ld_reg.sign, 1, "-0 sign");
    ld(MF_SGL, 64'h7F80_0000); chk(ld_reg.dtype, DT_INF, "inf type");
    ld(MF_DBL, 64'h7FF8_0000_0000_0000); chk(ld_reg.dtype, DT_NAN, "nan type");
    ld(MF_SGL, 64'h0000_0001); chk(ld_reg.dtype, DT_DENORM, "denormal type");
    st(MF_DBL, '{sign: 1'b1, exp: '0, frac: '0, rtag: 2'b0, dtype: DT_INF});
    chk(st_word, 64'hFFF0_0000_0000_0000, "-inf store");
    // extended halves
    ld(MF_EXT1, {41'd0, 1'b1, 17'h1ABCD, 2'b10, 3'd3});
    chk({ld_we_hi, ld_we_frac}, 2'b10, "EXT1 enables");
    chk({ld_reg.sign, ld_reg.exp, ld_reg.rtag, ld_reg.dtype}, {1'b1, 17'h1ABCD, 2'b10, 3'd3},
        "EXT1 fields");
    ld(MF_EXT2, 64'hDEAD_BEEF_0123_4567);
    chk({ld_we_hi, ld_we_frac}, 2'b01, "EXT2 enables");
    chk(ld_reg.frac, 64'hDEAD_BEEF_0123_4567, "EXT2 fraction");
    st_reg = '{sign: 1'b1, exp: 17'h1ABCD, frac: 64'h0123_4567_89AB_CDEF, rtag: 2'b01,
               dtype: DT_EXT};
    st(MF_EXT1, st_reg); chk(st_word, {41'd0, 1'b1, 17'h1ABCD, 2'b01, 3'd3}, "EXT1 store");
    st(MF_EXT2, st_reg); chk(st_word, 64'h0123_4567_89AB_CDEF, "EXT2 store");
    // out of single range: 2^200 stored as single is infinity, 2^-200 is zero
    st(MF_SGL, '{sign: 1'b0, exp: 17'(65535 + 200), frac: 64'h8000_0000_0000_0000, rtag: 2'b0,
                 dtype: DT_DBL});
    chk(st_word, 64'h7F80_0000, "single overflow store");
    st(MF_SGL, '{sign: 1'b0, exp: 17'(65535 - 200), frac: 64'h8000_0000_0000_0000, rtag: 2'b0,
                 dtype: DT_DBL});
    chk(st_word, 64'h0, "single underflow store");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
