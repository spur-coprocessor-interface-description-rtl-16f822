// tb_fpu_fpsw: checks the reset value, sticky accumulation of exception flags, the masking of
// fpuExcept by the trap enables, the compare bit (fpuBrT_F) changing only on FCMP commits, and
// software writes through the load path.
module tb_fpu_fpsw;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, commit, commit_is_cmp, commit_cc, sw_we, fpu_except, fpu_brtf;
  logic [3:0] commit_flags;
  logic [63:0] sw_wdata, sw_rdata;
  int checks = 0, failures = 0;

  fpu_fpsw dut (.*);

  task automatic chk(input logic [63:0] got, input logic [63:0] exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp_v);
    end
  endtask

  task automatic do_commit(input logic [3:0] fl, input logic cmp, input logic cc);
    @(negedge clk);
    commit = 1; commit_flags = fl; commit_is_cmp = cmp; commit_cc = cc;
    @(negedge clk);
    commit = 0;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; commit = 0; commit_flags = 0; commit_is_cmp = 0; commit_cc = 0;
    sw_we = 0; sw_wdata = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    chk(sw_rdata, 64'h70, "reset value");
    chk(fpu_except, 0, "no exception after reset");
    do_commit(4'b1000, 0, 1);                 // inexact only: enabled? no
    chk(sw_rdata, 64'h78, "inexact sticky");
    chk(fpu_except, 0, "inexact does not trap");
    chk(fpu_brtf, 0, "cc unchanged by non-compare");
    do_commit(4'b0000, 1, 1);                 // FCMP true
    chk(fpu_brtf, 1, "compare true");
    do_commit(4'b0010, 0, 0);                 // overflow
    chk(fpu_except, 1, "overflow raises fpuExcept");
    chk(sw_rdata, 64'h17A, "flags accumulate");
    do_commit(4'b0001, 1, 0);                 // FCMP false with operand trap
    chk(fpu_brtf, 0, "compare false");
    chk(sw_rdata[3:0], 4'b1011, "operand flag added");
    // software clears the flags and enables inexact
    @(negedge clk); sw_we = 1; sw_wdata = 64'h0000_0000_0000_0080;
    @(negedge clk); sw_we = 0;
    chk(fpu_except, 0, "cleared by software");
    chk(sw_rdata, 64'h80, "software value");
    do_commit(4'b1000, 0, 0);
    chk(fpu_except, 1, "inexact traps once enabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
