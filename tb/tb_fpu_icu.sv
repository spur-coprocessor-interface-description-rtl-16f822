// tb_fpu_icu: drives the interface control unit through the CPU-side pins, with the execution
// unit, register file and Fpsw replaced by simple testbench models. Checks the dispatch of
// arithmetic operations (with sequence tags) and their buffering while the unit is busy, the
// Exec-Mem-Wr timing of loads, stores and FMOV, the repetition of Mem until dataValid, the
// effect of fpuSuspend (no Mem entry, parked fetch, blocked commit of the young operation), the
// cancellation by TRAP_CALL of the last received FPU instruction and nothing else, and Fpsw
// access through specifier 15.
module tb_fpu_icu;
  import spur_fpu_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, new_instr, suspend, data_valid, st_data_oe;
  instr_t instr, eu_instr;
  logic [63:0] ld_data, st_data, fpsw_wdata, fpsw_rdata;
  logic eu_start, eu_accept, eu_active, eu_blk, eu_kill, fpsw_we;
  seq_t eu_seq, eu_cur_seq, eu_blk_seq, eu_kill_seq;
  logic [4:0] rfa_rs1, rfa_rs2, rfb_rs, rfb_wa;
  fpreg_t rfb_rd, rfb_wd;
  logic rfb_we_hi, rfb_we_frac;
  int checks = 0, failures = 0;

  fpu_icu dut (.*);

  // register file model for port B
  fpreg_t rf [16];
  always_comb rfb_rd = rf[rfb_rs[3:0]];
  always_ff @(posedge clk) begin
    if (rfb_we_hi) begin
      rf[rfb_wa[3:0]].sign  <= rfb_wd.sign;  rf[rfb_wa[3:0]].exp   <= rfb_wd.exp;
      rf[rfb_wa[3:0]].rtag  <= rfb_wd.rtag;  rf[rfb_wa[3:0]].dtype <= rfb_wd.dtype;
    end
    if (rfb_we_frac) rf[rfb_wa[3:0]].frac <= rfb_wd.frac;
  end
  assign fpsw_rdata = 64'h0000_0000_0000_0171;
  assign eu_active = 1'b0;
  assign eu_cur_seq = '0;

  task automatic chk(input logic [127:0] got, input logic [127:0] exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s: got %h expected %h (t=%0t)", what, got, exp_v, $time);
    end
  endtask

  // drive one cycle: inputs set after the falling edge, sampled at the next rising edge
  task automatic cyc(input logic ni = 0, input instr_t i = '0, input logic su = 0,
                     input logic dv = 0, input logic [63:0] d = '0);
    @(negedge clk);
    new_instr = ni; instr = i; suspend = su; data_valid = dv; ld_data = d;
    #1;
  endtask

  function automatic instr_t mk(input logic [6:0] op, input int rd, input int rs1 = 1,
                                input int rs2 = 2);
    return '{opcode: op, rs1: 5'(rs1), rs2: 5'(rs2), rd: 5'(rd)};
  endfunction

  localparam instr_t CPU_ADD = '{opcode: 7'h01, rs1: 5'd3, rs2: 5'd4, rd: 5'd5};
  localparam instr_t TRAP    = '{opcode: OP_TRAP_CALL, rs1: 5'd0, rs2: 5'd0, rd: 5'd0};

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seq_t s0;
    int n;
    for (int i = 0; i < 16; i++) rf[i] = '0;
    rf[6] = '{sign: 1'b0, exp: 17'd65536, frac: 64'hC000_0000_0000_0000, rtag: 2'b0,
              dtype: DT_DBL};                                        // 3.0
    rst = 1; new_instr = 0; suspend = 0; data_valid = 0; ld_data = 0; instr = '0;
    eu_accept = 1;
    repeat (2) @(negedge clk);
    rst = 0;

    // --- arithmetic dispatch, straight into a free unit
    cyc(1, mk(OP_FADD, 7, 1, 2));
    chk(eu_start, 1, "FADD starts");
    chk(eu_instr, mk(OP_FADD, 7, 1, 2), "FADD fields");
    chk({rfa_rs1, rfa_rs2}, {5'd1, 5'd2}, "port A read addresses");
    s0 = eu_seq;
    // --- a CPU instruction is received but starts nothing
    cyc(1, CPU_ADD);
    chk(eu_start, 0, "CPU instruction ignored");
    // --- buffering while the unit is busy
    eu_accept = 0;
    cyc(1, mk(OP_FMUL, 8));
    chk(eu_start, 0, "FMUL waits");
    cyc();
    cyc();
    eu_accept = 1; #1;
    chk(eu_start, 1, "buffered FMUL starts when the unit is free");
    chk(eu_instr, mk(OP_FMUL, 8), "buffered FMUL fields");
    chk(eu_seq, s0 + 2, "sequence tag counts every received instruction");
    cyc();
    chk(eu_start, 0, "buffer empty");

    // --- load: Exec, Mem (miss twice), Wr
    cyc(1, mk(OP_LD_DBL, 5));
    n = 0;
    cyc();                                  // Exec
    chk(st_data_oe, 0, "load drives no data");
    cyc(0, '0, 0, 0);                       // Mem, no data
    cyc(0, '0, 0, 0);                       // Mem repeated
    cyc(0, '0, 0, 1, 64'h4014_0000_0000_0000);   // Mem, data 5.0
    chk({rfb_we_hi, rfb_we_frac}, 2'b00, "no write before Wr");
    cyc();                                  // Wr
    chk({rfb_we_hi, rfb_we_frac, rfb_wa}, {2'b11, 5'd5}, "load writes in Wr");
    chk(rfb_wd.exp, 17'd65537, "load converted exponent (5.0)");
    chk(rfb_wd.frac, 64'hA000_0000_0000_0000, "load converted fraction (5.0)");
    cyc();
    chk({rfb_we_hi, rfb_we_frac}, 2'b00, "single write");

    // --- store from register 6 (3.0)
    cyc(1, mk(OP_ST_DBL, 0, 1, 6));
    cyc();                                  // Exec
    chk(st_data_oe, 0, "store data not yet on the bus");
    cyc(0, '0, 0, 0);                       // Mem, miss
    chk(st_data_oe, 1, "store drives in Mem");
    chk(st_data, 64'h4008_0000_0000_0000, "store word (3.0)");
    cyc(0, '0, 0, 1);                       // Mem, done
    chk(st_data_oe, 1, "store still on the bus");
    cyc();
    chk(st_data_oe, 0, "store finished");

    // --- FMOV R9 <- R6
    cyc(1, mk(OP_FMOV, 9, 6, 0));
    cyc(); cyc(); cyc();
    chk({rfb_we_hi, rfb_we_frac, rfb_wa}, {2'b11, 5'd9}, "FMOV writes in Wr");
    chk(rfb_wd, rf[6], "FMOV value");
    cyc();

    // --- Figure 13: CPU load misses, FPU load behind it must not take the first dataValid
    cyc(1, CPU_ADD);                        // I0 (CPU load) Ifet
    cyc(1, mk(OP_LD_DBL, 10));              // I0 Exec, I1 Ifet
    cyc(1, CPU_ADD, 1);                     // I0 Mem misses, I1 Exec, I2 Ifet; suspend
    cyc(0, '0, 1);                          // suspended
    cyc(0, '0, 0, 1, 64'h1111_1111_1111_1111);  // last suspended cycle: data for I0
    chk(st_data_oe, 0, "FPU load not in Mem during suspension");
    cyc(0, '0, 0, 1, 64'h4000_0000_0000_0000);  // I1 Mem: its data (2.0)
    cyc();                                  // I1 Wr
    chk({rfb_we_hi, rfb_wa}, {1'b1, 5'd10}, "FPU load after CPU miss writes");
    chk(rfb_wd.exp, 17'd65536, "FPU load took its own data (2.0)");
    cyc();

    // --- parked instruction: FADD latched while suspend is high waits for the end
    cyc(1, mk(OP_FADD, 11), 1);
    chk(eu_start, 0, "parked FADD not started");
    cyc(0, '0, 1);
    chk(eu_start, 0, "still parked");
    cyc(0, '0, 0);
    chk(eu_start, 1, "parked FADD received when suspension ends");
    chk(eu_instr, mk(OP_FADD, 11), "parked FADD fields");
    s0 = eu_seq;
    // it is the young operation: a suspension starting now blocks its commit
    cyc(0, '0, 1);
    chk({eu_blk, eu_blk_seq}, {1'b1, s0}, "young operation blocked");
    cyc(0, '0, 1);
    chk({eu_blk, eu_blk_seq}, {1'b1, s0}, "still blocked");
    // TRAP_CALL in the last suspended cycle kills it
    cyc(1, TRAP, 0);
    chk({eu_kill, eu_kill_seq}, {1'b1, s0}, "TRAP_CALL kills the last received FPU op");
    cyc();

    // --- TRAP_CALL after a CPU instruction kills nothing
    cyc(1, mk(OP_FADD, 12));
    cyc(1, CPU_ADD);
    cyc(1, TRAP);
    chk(eu_kill, 0, "no kill after a CPU instruction");
    chk(eu_blk, 0, "no block without suspension");
    cyc();

    // --- TRAP_CALL kills a buffered operation and a load in Exec
    eu_accept = 0;
    cyc(1, mk(OP_FDIV, 13));
    cyc(1, TRAP);
    cyc();
    eu_accept = 1; #1;
    chk(eu_start, 0, "killed buffered op never starts");
    cyc(1, mk(OP_LD_DBL, 14));
    cyc(1, TRAP);
    cyc(0, '0, 0, 1, 64'h4000_0000_0000_0000);
    cyc();
    chk({rfb_we_hi, rfb_we_frac}, 2'b00, "killed load writes nothing");

    // --- Fpsw through specifier 15
    cyc(1, mk(OP_LD_DBL, 15));
    cyc(); cyc(0, '0, 0, 1, 64'h0000_0000_0000_0070);
    cyc();
    chk({fpsw_we, fpsw_wdata}, {1'b1, 64'h70}, "load to specifier 15 writes the Fpsw");
    chk({rfb_we_hi, rfb_we_frac}, 2'b00, "not the register file");
    cyc(1, mk(OP_ST_DBL, 0, 1, 15));
    cyc(); cyc(0, '0, 0, 1);
    chk(st_data, 64'h171, "store from specifier 15 reads the Fpsw");
    cyc();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
