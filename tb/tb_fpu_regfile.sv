// tb_fpu_regfile: writes every register through both ports, checks read-back on all three
// read ports, partial (upper fields / fraction) writes on port B, port B priority when both
// ports write one register at the same edge, and that specifiers 15 and up read as zero.
module tb_fpu_regfile;
  import spur_fpu_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [4:0] a_rs1, a_rs2, a_wa, b_rs, b_wa;
  fpreg_t a_rd1, a_rd2, a_wd, b_rd, b_wd;
  logic a_we, b_we_hi, b_we_frac;
  int checks = 0, failures = 0;
  fpreg_t model [15];

  fpu_regfile dut (.*);

  function automatic fpreg_t pattern(input int i, input int k);
    fpreg_t r;
    r.sign  = 1'(i ^ k);
    r.exp   = 17'(i * 1237 + k * 7);
    r.frac  = {32'(i * 32'h9E3779B9 + k), 32'(k * 32'h7F4A7C15 + i)};
    r.rtag  = 2'(i + k);
    r.dtype = dtype_e'(3'((i + k) % 7));
    return r;
  endfunction

  task automatic chk(input fpreg_t got, input fpreg_t exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp_v);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_we = 0; b_we_hi = 0; b_we_frac = 0; a_wa = 0; b_wa = 0; a_wd = '0; b_wd = '0;
    a_rs1 = 0; a_rs2 = 0; b_rs = 0;
    // fill even registers through port A, odd ones through port B, both in the same cycles
    for (int i = 0; i < 15; i += 2) begin
      @(negedge clk);
      a_we = 1; a_wa = 5'(i); a_wd = pattern(i, 1); model[i] = a_wd;
      if (i + 1 < 15) begin
        b_we_hi = 1; b_we_frac = 1; b_wa = 5'(i + 1); b_wd = pattern(i + 1, 1);
        model[i+1] = b_wd;
      end else begin
        b_we_hi = 0; b_we_frac = 0;
      end
    end
    @(negedge clk); a_we = 0; b_we_hi = 0; b_we_frac = 0;
    for (int i = 0; i < 15; i++) begin
      a_rs1 = 5'(i); a_rs2 = 5'(14 - i); b_rs = 5'((i + 3) % 15);
      #1;
      chk(a_rd1, model[i], "port A read 1");
      chk(a_rd2, model[14-i], "port A read 2");
      chk(b_rd, model[(i+3)%15], "port B read");
    end
    // partial writes on port B
    @(negedge clk); b_wa = 5'd4; b_wd = pattern(4, 9); b_we_hi = 1; b_we_frac = 0;
    model[4].sign = b_wd.sign; model[4].exp = b_wd.exp; model[4].rtag = b_wd.rtag;
    model[4].dtype = b_wd.dtype;
    @(negedge clk); b_wa = 5'd5; b_wd = pattern(5, 9); b_we_hi = 0; b_we_frac = 1;
    model[5].frac = b_wd.frac;
    @(negedge clk); b_we_frac = 0;
    // both ports on register 7: port B wins
    a_we = 1; a_wa = 5'd7; a_wd = pattern(7, 20);
    b_we_hi = 1; b_we_frac = 1; b_wa = 5'd7; b_wd = pattern(7, 21); model[7] = b_wd;
    // a read at the write edge sees the old value (no forwarding)
    a_rs1 = 5'd7; #1; chk(a_rd1, model[7] == b_wd ? pattern(7, 1) : model[7], "read before write");
    @(negedge clk); a_we = 0; b_we_hi = 0; b_we_frac = 0;
    // write to specifier 15 is ignored, and reads as zero
    @(negedge clk); a_we = 1; a_wa = 5'd15; a_wd = pattern(3, 3);
    @(negedge clk); a_we = 0;
    a_rs1 = 5'd15; a_rs2 = 5'd31; #1;
    chk(a_rd1, '0, "specifier 15"); chk(a_rd2, '0, "specifier 31");
    for (int i = 0; i < 15; i++) begin
      b_rs = 5'(i); #1; chk(b_rd, model[i], "final read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
