// tb_scamp_multiply: multiplication loop on the SCAMP processor at its
// default size, checking the loop rate of two microcycles per iteration.
//
// The testbench places a shift-and-add multiply microroutine in the
// microprogram ROM (with check nibbles) and runs it for a set of operand
// pairs, resetting the processor between pairs. The routine forms the low
// 16 bits of M * Q, multiplier bits taken from the most significant end:
//
//   X0:  Q <- Q + Q, latch carry (bit 15 of Q), load loop counter with 15
//   X:   Q <- Q + Q, latch carry; branch on the carry latched before, to Y1
//   Y0:  P <- (P + 0) << 1, loop to X                 (previous bit was 0)
//   Y1:  P <- (P + M) << 1, loop to X                 (previous bit was 1)
//   E:   after the loop, P <- P + M if the last latched bit (bit 0) is 1
//
// Each iteration is one X and one Y microinstruction: two microcycles, with
// the bit shifted out of Q passed to the next iteration through the
// sequencer's latched carry. All intermediate results travel on the D-bus
// and are checked by the data path checker like any other word; the shift
// and carry fix-ups are exercised on every iteration. The result is put on
// the D-bus at the end and compared, data and mod-15 check symbol, with
// the product computed here. The cycle count of the loop is checked.
module tb_scamp_multiply;
  import scamp_pkg::*;

  logic clk = 0, ref_clk = 0, rst_n = 0;
  logic seq_sel = 0, rom_repair_en = 0;
  logic [3:0] rom_repair_idx = 0;
  cword_t io_addr, io_data_in, io_data_out, dbus_obs;
  logic io_data_oe, io_rw, io_msync, io_ssync;
  logic err_dpath, err_uprog, err_seq, err_clock, error;
  logic [1:0] err_pair;
  logic [3:0] err_log;
  logic [UAW-1:0] uaddr;

  scamp_top dut (.*);

  assign io_data_in = '0;
  assign io_ssync   = 1'b0;

  always #5 clk = ~clk;
  always #1 ref_clk = ~ref_clk;

  int checks = 0, failures = 0;

  initial begin
    #400000;
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

  // ------------------------------------------------------- microassembler
  localparam logic [9:0] X0 = 10'h003, XL = 10'h004, Y0 = 10'h005, E = 10'h006,
                         Y1 = 10'h040, FADD = 10'h050, OUT = 10'h060;
  localparam int ITER = 15;

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

  function automatic uword_t with_seq(input uword_t u, input seq_op_e op, input logic [9:0] target,
                                      input cond_e c = CC_TRUE);
    u.seq_op = op;
    u.lit = 20'(target);
    u.cond_sel = c;
    return u;
  endfunction

  task automatic put(input logic [9:0] a, input uword_t u);
    dut.u_mprom.rom[a] = {uparity(u), u};
  endtask

  // Q in SP0, M in SP1, P in GR[RW] (RW = 0 after reset)
  function automatic uword_t dbl_q();      // Q <- Q + Q, latch carry
    uword_t u;
    u = nop();
    u.alu_op = ALU_ADD; u.a_src = ASRC_SP; u.spa = 0; u.b_src = BSRC_SP; u.spb = 0;
    u.dst = DST_SP; u.cc_latch = 1'b1;
    return u;
  endfunction

  function automatic uword_t acc(input logic add_m, input sh_op_e sh);   // P <- (P + M?) sh
    uword_t u;
    u = nop();
    u.alu_op = ALU_ADD; u.a_src = ASRC_GR; u.gr_sel_x = 1'b0;
    u.b_src = add_m ? BSRC_SP : BSRC_ZERO; u.spb = 1;
    u.sh_op = sh; u.dst = DST_GR;
    return u;
  endfunction

  task automatic assemble(input logic [15:0] m, input logic [15:0] q);
    uword_t u;
    for (int i = 0; i < 1024; i++) dut.u_mprom.rom[i] = '0;
    u = cnst(m); u.dst = DST_SP; u.spb = 1; put(10'h000, u);
    u = cnst(q); u.dst = DST_SP; u.spb = 0; put(10'h001, u);
    u = cnst(16'h0000); u.dst = DST_GR; put(10'h002, u);
    put(X0, with_seq(dbl_q(), SEQ_LDCNT, 10'(ITER)));
    put(XL, with_seq(dbl_q(), SEQ_JCOND, Y1, CC_CARRY));
    put(Y0, with_seq(acc(1'b0, SH_SHL), SEQ_LOOP, XL));
    put(E, with_seq(nop(), SEQ_JCOND, FADD, CC_CARRY));
    put(E + 1, with_seq(nop(), SEQ_JUMP, OUT));
    put(Y1, with_seq(acc(1'b1, SH_SHL), SEQ_LOOP, XL));
    put(Y1 + 1, with_seq(nop(), SEQ_JUMP, E));
    put(FADD, with_seq(acc(1'b1, SH_NONE), SEQ_JUMP, OUT));
    u = nop(); u.a_src = ASRC_GR; put(OUT, u);
    put(OUT + 1, with_seq(nop(), SEQ_JUMP, OUT + 1));
  endtask

  // ------------------------------------------------------ event counters
  int n_loop_cycles, n_y0, n_y1, n_fix, n_dpath_err;

  always @(negedge clk) if (rst_n) begin
    if (dut.u_seq0.upc inside {XL, Y0, Y1}) n_loop_cycles++;
    if (dut.u_seq0.upc == Y0) n_y0++;
    if (dut.u_seq0.upc == Y1) n_y1++;
    if (dut.uw.dbus_src == DB_SLICES && (dut.cout16 != dut.chk_cout || dut.sin != dut.sout)) n_fix++;
    if (err_dpath || err_uprog || err_seq) n_dpath_err++;
  end

  task automatic run_one(input logic [15:0] m, input logic [15:0] q);
    logic [15:0] prod;
    int loop0, cycles;
    cword_t got;
    prod = m * q;
    rst_n = 0;
    assemble(m, q);
    @(negedge clk) rst_n = 1;
    loop0 = n_loop_cycles;
    cycles = 0;
    while (dut.u_seq0.upc != OUT && cycles < 200) begin
      @(negedge clk);
      cycles++;
    end
    got = dbus_obs;
    chk(dut.u_seq0.upc == OUT, $sformatf("%h * %h: routine reached its end", m, q));
    chk(got.data == prod, $sformatf("%h * %h: product %h expected %h", m, q, got.data, prod));
    chk(got.chk == r15(got.data), $sformatf("%h * %h: check symbol %0d", m, q, got.chk));
    chk(n_loop_cycles - loop0 == 2 * ITER,
        $sformatf("%h * %h: loop took %0d microcycles for %0d iterations", m, q, n_loop_cycles - loop0, ITER));
    repeat (2) @(negedge clk);
  endtask

  initial begin
    logic [15:0] ops [$];
    repeat (3) @(negedge clk);
    ops = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000, 16'h1234, 16'hABCD, 16'h00FF, 16'h7FFF};
    foreach (ops[i]) run_one(ops[i], ops[(i * 3 + 1) % ops.size()]);
    repeat (24) run_one(16'($urandom), 16'($urandom));
    chk(n_dpath_err == 0, $sformatf("no checker fired (%0d cycles with an error)", n_dpath_err));
    chk(n_y0 > 0, "loop iteration without add");
    chk(n_y1 > 0, "loop iteration with add");
    chk(n_fix > 0, "carry or shift fix-up inside the loop");
    $display("loop cycles=%0d (add=%0d, no add=%0d), fix-ups=%0d", n_loop_cycles, n_y1, n_y0, n_fix);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
