// tb_scamp_top: end-to-end test of the SCAMP processor at its default size.
//
// The testbench assembles a microprogram into the microprogram ROM (with
// the check nibble of every word), attaches a memory-mapped I/O device
// model and runs the program. The program computes a set of operations on
// two 16-bit operands and writes every result, with its check symbol, to the
// device through the I/O controller:
//   add with carry out, subtract both ways, two-step AND / OR / XOR, the
//   five one-bit shifts and rotations, a 4-bit right rotation through the
//   K-bus, a short operand from RX, an I/O read, an I/O read that times out
//   on the sequencer's loop counter, an opcode map branch, and a zero result;
// it uses CALL/RET for the I/O routines and branches on carry, sign and zero
// (a wrong branch lands on a trap address). A last microinstruction puts a
// constant with a wrong check symbol on the D-bus, the diagnostic the
// document mentions for exercising the data path checker.
//
// The testbench then checks every result and its mod-15 check symbol, and
// injects faults: a corrupted ROM word (microprogram checker), the same
// ROM package repaired from the check ROM, a disturbed sequencer copy
// (sequencer equality checker) and a stopped clock (clock checker), and
// checks the error log. A second
// pass, after reset, runs the whole program from the other sequencer copy
// with one ROM package corrupted in every word and repaired.
// Each mechanism is counted and must occur.
module tb_scamp_top;
  import scamp_pkg::*;

  logic clk = 0, ref_clk = 0, rst_n = 0;
  logic seq_sel = 0, rom_repair_en = 0;
  logic [3:0] rom_repair_idx = 0;
  cword_t io_addr, io_data_in, io_data_out, dbus_obs;
  logic io_data_oe, io_rw, io_msync, io_ssync;
  logic err_dpath, err_uprog, err_seq, err_clock, error;
  logic [3:0] err_log;
  logic [1:0] err_pair;
  logic [UAW-1:0] uaddr;
  bit clk_run = 1;

  scamp_top dut (.*);

  always #5 if (clk_run) clk = ~clk; else clk = 1'b0;
  always #1 ref_clk = ~ref_clk;

  int checks = 0, failures = 0;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [3:0] r15(input logic [15:0] d);
    return 4'(int'(d) % 15);
  endfunction

  // ------------------------------------------------------------ I/O device
  // Responds to MSYNC with SSYNC after three clocks; addresses at or above
  // 0xF000 never answer.
  cword_t mem [logic [15:0]];
  int     wait_cnt;
  always @(posedge clk) begin
    if (!io_msync) begin
      io_ssync <= 1'b0;
      wait_cnt <= 0;
    end else if (io_addr.data < 16'hF000) begin
      wait_cnt <= wait_cnt + 1;
      if (wait_cnt == 2) begin
        io_ssync <= 1'b1;
        if (!io_rw) mem[io_addr.data] = io_data_out;
      end
    end
  end
  always @* io_data_in = mem.exists(io_addr.data) ? mem[io_addr.data] : '0;

  // ------------------------------------------------------- microassembler
  localparam logic [9:0] WRITE = 10'h300, READ = 10'h310, MAPT = 10'h25A,
                         DONE = 10'h3E0, TRAP = 10'h3F0;
  localparam logic [15:0] A = 16'h9A5C, B = 16'h7B3E, RDV = 16'h3C5A, S = A + B;
  int pc;

  task automatic put(input uword_t u);
    dut.u_mprom.rom[pc] = {uparity(u), u};
    pc++;
  endtask

  function automatic uword_t nop();
    uword_t u;
    u = '0;
    u.chk_en = 1'b1;
    u.a_src  = ASRC_ZERO;
    u.b_src  = BSRC_ZERO;
    u.kd_chk = 1'b1;
    return u;
  endfunction

  function automatic uword_t cnst(input logic [15:0] v);
    uword_t u;
    u = nop();
    u.dbus_src = DB_CONST;
    u.lit = {r15(v), v};
    return u;
  endfunction

  function automatic uword_t seq(input seq_op_e op, input logic [9:0] target,
                                 input cond_e c = CC_TRUE, input logic pol = 0);
    uword_t u;
    u = nop();
    u.seq_op = op;
    u.lit = 20'(target);
    u.cond_sel = c;
    u.cond_pol = pol;
    return u;
  endfunction

  // ALU operation on scratchpads, result to GR[RW]
  function automatic uword_t alu(input alu_op_e op, input a_src_e as, input logic [1:0] spa,
                                 input b_src_e bs, input logic [1:0] spb, input logic ci = 0,
                                 input sh_op_e sh = SH_NONE);
    uword_t u;
    u = nop();
    u.alu_op = op; u.a_src = as; u.spa = spa; u.b_src = bs; u.spb = spb; u.cin = ci;
    u.sh_op = sh; u.dst = DST_GR; u.gr_sel_x = 1'b0;
    return u;
  endfunction

  function automatic uword_t sp2(input logic [15:0] v);
    uword_t u;
    u = cnst(v);
    u.dst = DST_SP;
    u.spb = 2;
    return u;
  endfunction

  logic [15:0] expect_val [int];
  int nslot;

  // slot address -> SP2, operation words, CALL WRITE
  task automatic slot(input uword_t ops [$], input logic [15:0] exp);
    put(sp2(16'h0100 + 16'(nslot)));
    foreach (ops[i]) put(ops[i]);
    put(seq(SEQ_CALL, WRITE));
    expect_val[nslot] = exp;
    nslot++;
  endtask

  task automatic assemble();
    uword_t u, s1;
    int ret;
    for (int i = 0; i < 1024; i++) dut.u_mprom.rom[i] = '0;
    // I/O write routine: address in SP2, data in GR[RW]
    pc = WRITE;
    u = nop(); u.a_src = ASRC_SP; u.spa = 2; u.io_op = IO_BAR_WRITE; put(u);
    u = nop(); u.a_src = ASRC_GR; u.io_op = IO_BDR; put(u);
    u = seq(SEQ_LDCNT, 10'd20); u.io_op = IO_MSYNC_ON; put(u);
    put(seq(SEQ_JCOND, WRITE + 6, CC_SSYNC));
    put(seq(SEQ_LOOP, WRITE + 3));
    put(seq(SEQ_JUMP, TRAP));
    u = seq(SEQ_RET, 0); u.io_op = IO_MSYNC_OFF; put(u);
    // I/O read routine: address in SP2, data to GR[RW], 0xDEAD on timeout
    pc = READ;
    u = nop(); u.a_src = ASRC_SP; u.spa = 2; u.io_op = IO_BAR_READ; put(u);
    u = seq(SEQ_LDCNT, 10'd8); u.io_op = IO_MSYNC_ON; put(u);
    put(seq(SEQ_JCOND, READ + 6, CC_SSYNC));
    put(seq(SEQ_LOOP, READ + 2));
    u = cnst(16'hDEAD); u.dst = DST_GR; u.io_op = IO_MSYNC_OFF; u.seq_op = SEQ_RET; put(u);
    put(nop());
    u = nop(); u.dbus_src = DB_IO; u.dst = DST_GR; u.io_op = IO_MSYNC_OFF; u.seq_op = SEQ_RET; put(u);
    // traps
    pc = TRAP; put(seq(SEQ_JUMP, TRAP));
    pc = DONE; put(nop()); put(seq(SEQ_JUMP, DONE));

    // main program
    pc = 0; nslot = 0;
    u = cnst(16'h0021); u.ld_rw = 1; u.ld_rx = 1; put(u);               // RW = 2, RX = 1
    u = cnst(A); u.dst = DST_GR; u.gr_sel_x = 1; put(u);                // GR1 = A
    u = cnst(B); u.dst = DST_SP; u.spb = 1; put(u);                     // SP1 = B
    u = nop(); u.a_src = ASRC_GR; u.gr_sel_x = 1; u.dst = DST_SP; u.spb = 0; put(u);  // SP0 = GR1

    u = alu(ALU_ADD, ASRC_SP, 0, BSRC_SP, 1); u.cc_latch = 1;
    slot('{u}, A + B);
    put(seq(SEQ_JCOND, TRAP, CC_CARRY, 1));
    slot('{alu(ALU_SUB, ASRC_SP, 0, BSRC_SP, 1, 1)}, A - B);
    u = alu(ALU_SUB, ASRC_SP, 1, BSRC_SP, 0, 1); u.cc_latch = 1;
    slot('{u}, B - A);
    put(seq(SEQ_JCOND, TRAP, CC_SIGN, 1));
    // two-step logical operations
    s1 = alu(ALU_OR, ASRC_SP, 0, BSRC_SP, 1); s1.dst = DST_NONE; s1.chk_en = 0;
    u = alu(ALU_AND, ASRC_SP, 0, BSRC_SP, 1); u.fix_sub = FIX_SUB1;
    slot('{s1, u}, A & B);
    s1 = alu(ALU_AND, ASRC_SP, 0, BSRC_SP, 1); s1.dst = DST_NONE; s1.chk_en = 0;
    u = alu(ALU_OR, ASRC_SP, 0, BSRC_SP, 1); u.fix_sub = FIX_SUB1;
    slot('{s1, u}, A | B);
    u = alu(ALU_XOR, ASRC_SP, 0, BSRC_SP, 1); u.fix_sub = FIX_SUB2;
    slot('{s1, u}, A ^ B);
    // shifts
    slot('{alu(ALU_ADD, ASRC_SP, 0, BSRC_SP, 1, 0, SH_ROL)}, {S[14:0], S[15]});
    slot('{alu(ALU_ADD, ASRC_SP, 0, BSRC_ZERO, 0, 0, SH_SHL)}, A << 1);
    slot('{alu(ALU_ADD, ASRC_SP, 0, BSRC_ZERO, 0, 0, SH_SHR)}, A >> 1);
    slot('{alu(ALU_ADD, ASRC_SP, 0, BSRC_ZERO, 0, 0, SH_SRA)}, {A[15], A[15:1]});
    slot('{alu(ALU_ADD, ASRC_SP, 1, BSRC_ZERO, 0, 0, SH_ROR)}, {B[0], B[15:1]});
    // 4-bit right rotation over the K-bus; the check slice keeps the D-bus
    u = alu(ALU_ADD, ASRC_SP, 0, BSRC_ZERO, 0); u.kd_data = 1; u.kd_chk = 0;
    slot('{u}, {A[3:0], A[15:4]});
    // short operand from RX
    slot('{alu(ALU_ADD, ASRC_SP, 0, BSRC_RX, 0)}, A + 16'd1);
    // I/O read, and a read of an absent device ending on the loop counter
    put(sp2(16'h0040)); put(seq(SEQ_CALL, READ));
    slot('{}, RDV);
    put(sp2(16'hF000)); put(seq(SEQ_CALL, READ));
    slot('{}, 16'hDEAD);
    // opcode map: opcode 0x5A, map base 2 from the constant's bits 9:8
    u = cnst(16'h5A00); u.seq_op = SEQ_MAP; put(u);
    begin
      ret = pc;
      pc = MAPT;
      u = cnst(16'h0777); u.dst = DST_GR; put(u);
      put(seq(SEQ_JUMP, 10'(ret)));
      pc = ret;
    end
    slot('{}, 16'h0777);
    // zero result
    u = alu(ALU_SUB, ASRC_SP, 0, BSRC_SP, 0, 1); u.cc_latch = 1;
    slot('{u}, 16'h0000);
    put(seq(SEQ_JCOND, TRAP, CC_ZERO, 1));
    // diagnostic: a constant with a wrong check symbol
    u = cnst(16'h1234); u.lit[19:16] = r15(16'h1234) ^ 4'h1; put(u);
    put(seq(SEQ_JUMP, DONE));
  endtask

  // ------------------------------------------------------ event counters
  int n_carry_fix, n_shift_fix, n_twostep, n_krot, n_const, n_ioread, n_loop, n_timeout;
  int n_call, n_ret, n_map, n_jtaken, n_short, n_dpath_err, n_uprog_err, n_seq_err, n_clk_err;
  int n_repair_cycles, n_swap_cycles;
  bit expect_quiet = 1;
  int n_before;

  always @(negedge clk) if (rst_n) begin
    if (dut.uw.dbus_src == DB_SLICES && dut.cout16 != dut.chk_cout) n_carry_fix++;
    if (dut.sh_dir != DIR_NONE && dut.sin != dut.sout) n_shift_fix++;
    if (dut.uw.fix_sub != FIX_NONE) n_twostep++;
    if (dut.uw.kd_data && dut.uw.dst != DST_NONE) n_krot++;
    if (dut.uw.dbus_src == DB_CONST) n_const++;
    if (dut.uw.dbus_src == DB_IO) n_ioread++;
    if (dut.uw.seq_op == SEQ_LOOP) n_loop++;
    if (dut.uw.seq_op == SEQ_CALL) n_call++;
    if (dut.uw.seq_op == SEQ_RET) n_ret++;
    if (dut.uw.seq_op == SEQ_MAP) n_map++;
    if (dut.uw.b_src == BSRC_RX) n_short++;
    if (dut.uw.seq_op == SEQ_JCOND && uaddr == dut.uw.lit[9:0]) n_jtaken++;
    if (uaddr == READ + 4) n_timeout++;
    if (err_dpath) n_dpath_err++;
    if (err_uprog) n_uprog_err++;
    if (err_seq) n_seq_err++;
    if (rom_repair_en) n_repair_cycles++;
    if (seq_sel) n_swap_cycles++;
    if (expect_quiet && (err_uprog || err_seq || err_clock)) begin
      failures++;
      $display("unexpected checker error at uaddr %h: %b %b %b", uaddr, err_uprog, err_seq, err_clock);
    end
    if (uaddr == TRAP) begin
      failures++;
      $display("trap reached");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic run_program(input string pass);
    int cycles, d0;
    mem.delete();
    mem[16'h0040] = '{chk: r15(RDV), data: RDV};
    d0 = n_dpath_err;
    cycles = 0;
    while (uaddr != DONE && cycles < 3000) begin
      @(negedge clk);
      cycles++;
    end
    repeat (4) @(negedge clk);
    chk(uaddr == DONE || uaddr == DONE + 1, {pass, ": program reached its end"});
    $display("%s: %0d microcycles", pass, cycles);
    chk(n_dpath_err - d0 == 1, $sformatf("%s: data path checker fired %0d times, expected once (diagnostic constant)",
        pass, n_dpath_err - d0));
    for (int k = 0; k < nslot; k++) begin
      cword_t got;
      got = mem.exists(16'h0100 + 16'(k)) ? mem[16'h0100 + 16'(k)] : '1;
      chk(got.data == expect_val[k], $sformatf("%s slot %0d: data %h expected %h", pass, k, got.data, expect_val[k]));
      chk(got.chk == r15(got.data), $sformatf("%s slot %0d: check %0d for data %h", pass, k, got.chk, got.data));
    end
  endtask

  initial begin
    io_ssync = 0;
    assemble();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // ---- pass 1: sequencer 0, no repair
    run_program("pass 1");

    // microprogram checker: corrupt one ROM package of the word at DONE
    expect_quiet = 0;
    dut.u_mprom.rom[DONE][4*5 +: 4] ^= 4'h6;
    repeat (6) @(negedge clk);
    chk(n_uprog_err > 0, "corrupted ROM word detected");
    // repair: rebuild package 5 from the check ROM
    rom_repair_en = 1; rom_repair_idx = 4'd5;
    repeat (3) @(negedge clk);
    n_before = n_uprog_err;
    repeat (10) @(negedge clk);
    chk(n_uprog_err == n_before, "repaired ROM gives code words");
    dut.u_mprom.rom[DONE][4*5 +: 4] ^= 4'h6;
    rom_repair_en = 0;
    repeat (3) @(negedge clk);

    // sequencer checker: disturb copy 1 while at the NOP of the final loop
    wait (uaddr == DONE + 1);
    dut.u_seq1.upc = dut.u_seq1.upc + 10'd3;
    #1;
    if (err_seq) n_seq_err++;
    chk(err_seq, "sequencer mismatch detected");
    repeat (4) @(negedge clk);
    chk(err_log == 4'b0111, $sformatf("error log after pass 1: %b", err_log));

    // ---- pass 2: sequencer 1 drives the ROM, ROM package 3 failed everywhere
    rst_n = 0;
    seq_sel = 1;
    rom_repair_en = 1; rom_repair_idx = 4'd3;
    for (int i = 0; i < 1024; i++) dut.u_mprom.rom[i][4*3 +: 4] ^= 4'(i % 15 + 1);
    @(negedge clk) rst_n = 1;
    expect_quiet = 1;
    run_program("pass 2");
    expect_quiet = 0;

    // clock checker: stop the clock
    chk(!err_clock, "clock good");
    clk_run = 0;
    #200;
    n_clk_err = err_clock ? 1 : 0;
    clk_run = 1;
    repeat (2) @(negedge clk);
    chk(err_log == 4'b1001, $sformatf("error log after pass 2 and clock stop: %b", err_log));

    // every mechanism must have happened
    chk(n_carry_fix > 0, "carry fix-up");
    chk(n_shift_fix > 0, "shift fix-up");
    chk(n_twostep > 0, "two-step logical operation");
    chk(n_krot > 0, "K-bus rotation");
    chk(n_const > 0, "microprogram constant");
    chk(n_ioread > 0, "I/O read");
    chk(n_loop > 0, "loop counter wait");
    chk(n_timeout > 0, "I/O timeout");
    chk(n_call > 0 && n_ret > 0, "subroutine call and return");
    chk(n_map > 0, "opcode map");
    chk(n_jtaken > 0, "conditional branch taken");
    chk(n_short > 0, "short operand");
    chk(n_dpath_err > 0, "data path checker");
    chk(n_uprog_err > 0, "microprogram checker");
    chk(n_seq_err > 0, "sequencer checker");
    chk(n_clk_err > 0, "clock checker");
    chk(n_repair_cycles > 0, "ROM repair");
    chk(n_swap_cycles > 0, "sequencer swap");
    $display("events: carry_fix=%0d shift_fix=%0d twostep=%0d krot=%0d const=%0d ioread=%0d loop=%0d timeout=%0d",
             n_carry_fix, n_shift_fix, n_twostep, n_krot, n_const, n_ioread, n_loop, n_timeout);
    $display("events: call=%0d ret=%0d map=%0d jtaken=%0d short=%0d dpath_err=%0d uprog_err=%0d seq_err=%0d clk_err=%0d",
             n_call, n_ret, n_map, n_jtaken, n_short, n_dpath_err, n_uprog_err, n_seq_err, n_clk_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
