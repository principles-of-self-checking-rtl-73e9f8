// scamp_top: SCAMP, a microprogrammed 16-bit processor that detects every
// failure of a single integrated circuit package while it runs.
//
// Structure (one microcycle per clock):
//   * Two identical microprogram sequencers (useq) receive the same inputs.
//     The one chosen by seq_sel addresses the microprogram memory; a totally
//     self-checking equality checker compares the two next addresses.
//   * The microprogram memory (mprom) holds 60-bit microinstructions in
//     fifteen 4-bit ROM slices plus a check ROM, loaded into the microprogram
//     data register. The control lines go to their destinations and are
//     collected in the sink register of sink_checker, which checks them
//     against the check nibble one microcycle later.
//   * Five identical 4-bit slices (scamp_slice) form the data paths: four for
//     the 16-bit data part, one for the mod-15 check symbol. The D-bus carries
//     {check, data}; it is driven by the slices, by a microprogram constant,
//     or by the I/O data bus. The W and X inputs of every slice take D-bus
//     bits 7:4 and 3:0 (the register fields of an instruction). The K-bus of
//     each data slice is the D-bus rotated right by 4; the K-bus of the check
//     slice is the fix-up unit output.
//   * The fix-up unit turns the check slice output into the residue of the
//     two's complement result; its output is loaded into the check slice
//     (through K) when a fix-up is needed and is latched with the D-bus for
//     the data path checker (dpath_checker), which checks in the next cycle.
//   * The I/O controller (io_ctrl) holds BAR and BDR and the MSYNC, SSYNC and
//     R/W handshake signals.
//   * A periodic signal checker watches the clock against ref_clk.
// The four checkers' two-rail outputs are merged by two-rail checker cells
// into err_pair; error is high when err_pair is not a valid two-rail code.
// err_log keeps, until reset, which checkers have reported an error (data
// paths, microprogram, sequencers, clock), for error logging.
//
// Exceptions to identical slice control: when ALU operand B is RW or RX (a
// short operand) the upper three data slices take zero instead, so the
// operand is the 4-bit value and not that value repeated in every nibble;
// the check slice has its own K/D load select; in the second step of a
// two-step logical operation (fix_sub set) the check slice adds the check
// symbols (carry in 0) while the data slices perform AND, OR or XOR; and the
// check slice's shift input is its own shift output, so it always rotates.
// As in the document, no decoder sits between the microprogram data
// register and the slices: every slice decodes its own fields, and the
// shift direction lines are two bits of the shift field itself. The only
// logic on that path is the short-operand and check-slice overrides above
// and the choice of the bits entering the ends of the shift chain.
//
// What follows the document: the partitioning into sequencer, coded
// microprogram memory and sliced data paths; the duplicated sequencer; five
// identical slices with the listed registers; the D-bus with a single
// checker; K-bus wiring; fix-up feeding the check slice and the check
// register; two-step logical operations; the sink register; the I/O
// registers; four checkers. This design's own: the microinstruction format,
// the operation set, the fix-up equations' exact form, the sequencer command
// set and the ROM repair / sequencer select inputs (standing for the
// document's repair by re-plugging and jumpers).
module scamp_top
  import scamp_pkg::*;
(
  input  logic           clk,
  input  logic           ref_clk,        // reference for the clock checker
  input  logic           rst_n,
  // maintenance
  input  logic           seq_sel,        // 0: sequencer 0 addresses the ROM
  input  logic           rom_repair_en,
  input  logic [3:0]     rom_repair_idx,
  // I/O bus
  output cword_t         io_addr,
  input  cword_t         io_data_in,
  output cword_t         io_data_out,
  output logic           io_data_oe,
  output logic           io_rw,
  output logic           io_msync,
  input  logic           io_ssync,
  // checkers
  output logic           err_dpath,
  output logic           err_uprog,
  output logic           err_seq,
  output logic           err_clock,
  output logic [1:0]     err_pair,
  output logic           error,
  output logic [3:0]     err_log,        // sticky {clock, seq, uprog, dpath}
  // observation
  output cword_t         dbus_obs,
  output logic [UAW-1:0] uaddr
);
  // ---------------------------------------------------------------- control
  logic [UW-1:0]  mdr_data;
  logic [3:0]     mdr_check;
  uword_t         uw;
  logic [UAW-1:0] next0, next1;
  cword_t         dbus;
  logic           cout16, zero_f, sign_f;
  logic [1:0]     z_dp, z_up, z_seq, z_clk;

  assign uw    = uword_t'(mdr_data);
  assign uaddr = seq_sel ? next1 : next0;

  useq u_seq0 (
    .clk, .rst_n, .seq_op(uw.seq_op), .cond_sel(uw.cond_sel), .cond_pol(uw.cond_pol),
    .cc_latch(uw.cc_latch), .lit(uw.lit[UAW-1:0]), .opcode(dbus.data[15:8]),
    .carry(cout16), .zero(zero_f), .sign(sign_f), .ssync(io_ssync), .next_addr(next0)
  );
  useq u_seq1 (
    .clk, .rst_n, .seq_op(uw.seq_op), .cond_sel(uw.cond_sel), .cond_pol(uw.cond_pol),
    .cc_latch(uw.cc_latch), .lit(uw.lit[UAW-1:0]), .opcode(dbus.data[15:8]),
    .carry(cout16), .zero(zero_f), .sign(sign_f), .ssync(io_ssync), .next_addr(next1)
  );
  tsc_eq_checker #(.N(UAW)) u_seq_chk (.a(next0), .b(next1), .z(z_seq));

  mprom u_mprom (
    .clk, .rst_n, .addr(uaddr), .repair_en(rom_repair_en), .repair_idx(rom_repair_idx),
    .mdr_data, .mdr_check
  );

  // The sink register receives the control lines at their destinations.
  uword_t ctl_sink;
  assign ctl_sink = uw;
  sink_checker u_sink (.clk, .rst_n, .ctl_sink(ctl_sink), .check_sym(mdr_check), .z(z_up), .err(err_uprog));

  // ------------------------------------------------------------- data paths
  // The shift direction lines come straight from the microinstruction.
  sh_dir_e sh_dir;
  assign sh_dir = sh_dir_e'(uw.sh_op[3:2]);

  slice_ctl_t ctl_lo, ctl_hi, ctl_chk;
  always_comb begin
    ctl_lo = '{alu_op: uw.alu_op, a_src: uw.a_src, b_src: uw.b_src, gr_sel_x: uw.gr_sel_x,
               spa: uw.spa, spb: uw.spb, sh_dir: sh_dir, dst: uw.dst, kd_sel: uw.kd_data,
               ld_rw: uw.ld_rw, ld_rx: uw.ld_rx};
    ctl_hi = ctl_lo;
    if (uw.b_src inside {BSRC_RW, BSRC_RX}) ctl_hi.b_src = BSRC_ZERO;
    ctl_chk = ctl_lo;
    ctl_chk.kd_sel = uw.kd_chk;
    // Second step of a two-step logical operation: the check slice adds the
    // operands' check symbols; the fix-up unit subtracts the generated residue.
    if (uw.fix_sub != FIX_NONE) ctl_chk.alu_op = ALU_ADD;
  end

  logic [3:0] d_out [NSLICE];
  logic [NSLICE-1:0] cout, shl_out, shr_out;
  logic [3:0] chk_out, fix_t, gen;
  logic       chk_cout, chk_shl, chk_shr;
  logic       sin_l, sin_r, sin, sout;

  // Shift bits entering the ends of the 16-bit data part.
  always_comb begin
    sin_l = (uw.sh_op == SH_ROL) ? shl_out[NSLICE-1] : 1'b0;
    unique case (uw.sh_op)
      SH_ROR:  sin_r = shr_out[0];
      SH_SRA:  sin_r = shl_out[NSLICE-1];
      default: sin_r = 1'b0;
    endcase
    if (sh_dir == DIR_LEFT) begin
      sin = sin_l; sout = shl_out[NSLICE-1];
    end else begin
      sin = sin_r; sout = shr_out[0];
    end
  end

  for (genvar i = 0; i < NSLICE; i++) begin : g_data
    scamp_slice u_slice (
      .clk, .rst_n,
      .ctl      ((i == 0) ? ctl_lo : ctl_hi),
      .w        (dbus.data[7:4]),
      .x        (dbus.data[3:0]),
      .k        (dbus.data[4*((i+1)%NSLICE) +: 4]),
      .d_in     (dbus.data[4*i +: 4]),
      .cin      ((i == 0) ? uw.cin : cout[(i+NSLICE-1)%NSLICE]),
      .cout     (cout[i]),
      .sh_in_l  ((i == 0) ? sin_l : shl_out[(i+NSLICE-1)%NSLICE]),
      .sh_in_r  ((i == NSLICE-1) ? sin_r : shr_out[(i+1)%NSLICE]),
      .sh_out_l (shl_out[i]),
      .sh_out_r (shr_out[i]),
      .d_out    (d_out[i])
    );
  end

  scamp_slice u_chk_slice (
    .clk, .rst_n,
    .ctl      (ctl_chk),
    .w        (dbus.data[7:4]),
    .x        (dbus.data[3:0]),
    .k        (fix_t),
    .d_in     (dbus.chk),
    .cin      (uw.cin & (uw.fix_sub == FIX_NONE)),
    .cout     (chk_cout),
    .sh_in_l  (chk_shl),
    .sh_in_r  (chk_shr),
    .sh_out_l (chk_shl),
    .sh_out_r (chk_shr),
    .d_out    (chk_out)
  );

  assign cout16 = cout[NSLICE-1];

  // D-bus: one source at a time.
  always_comb begin
    unique case (uw.dbus_src)
      DB_CONST: dbus = cword_t'(uw.lit);
      DB_IO:    dbus = io_data_in;
      default: begin
        dbus.chk = chk_out;
        for (int i = 0; i < NSLICE; i++) dbus.data[4*i +: 4] = d_out[i];
      end
    endcase
  end
  assign zero_f   = (dbus.data == '0);
  assign sign_f   = dbus.data[DW-1];
  assign dbus_obs = dbus;

  fixup u_fixup (
    .v(dbus.chk), .arith(uw.dbus_src == DB_SLICES), .c4(chk_cout), .cout16(cout16),
    .sh_dir(sh_dir), .sin(sin), .sout(sout), .fix_sub(uw.fix_sub), .gen(gen), .t(fix_t)
  );

  dpath_checker u_dchk (
    .clk, .rst_n, .dbus_data(dbus.data), .fix_t(fix_t), .chk_en(uw.chk_en),
    .gen(gen), .z(z_dp), .err(err_dpath)
  );

  // -------------------------------------------------------------------- I/O
  io_ctrl u_io (
    .clk, .rst_n, .io_op(uw.io_op), .dbus(dbus), .io_addr, .io_data_out, .io_data_oe,
    .io_rw, .io_msync
  );

  // ------------------------------------------------------------- checkers
  periodic_checker u_clk_chk (.ref_clk, .rst_n, .mon_clk(clk), .z(z_clk), .err(err_clock));

  assign err_seq  = (z_seq[1] == z_seq[0]);
  assign err_pair = trc(trc(z_dp, z_up), trc(z_seq, z_clk));
  assign error    = (err_pair[1] == err_pair[0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) err_log <= '0;
    else        err_log <= err_log | {err_clock, err_seq, err_uprog, err_dpath};
  end
endmodule
