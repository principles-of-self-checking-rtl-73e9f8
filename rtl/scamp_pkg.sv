// scamp_pkg: types, constants and small functions shared by the SCAMP
// self-checking processor.
//
// SCAMP keeps every data word in a low-cost residue code: a 16-bit data part
// and a 4-bit check symbol equal to the data part modulo 15 (check base
// 2^4 - 1). The microprogram word is kept in a distance-2 4-adjacent code: a
// 4-bit check nibble that is the bitwise XOR of all data nibbles of the word.
// Checkers report on two-rail pairs: the pair is valid (no error) when its two
// bits differ.
//
// The 16-bit data width, the 4-bit slices, the mod-15 check base, the 1K-word
// microprogram and the 4-adjacent microprogram code follow the document. The
// microinstruction layout below, the operation encodings and the sequencer
// command set are this design's own choice: the document does not publish
// SCAMP's microinstruction format.
package scamp_pkg;

  localparam int unsigned DW      = 16;   // data part width
  localparam int unsigned CW      = 4;    // check symbol width (mod 15 residue)
  localparam int unsigned SW      = 4;    // slice width
  localparam int unsigned NSLICE  = DW / SW;
  localparam int unsigned UAW     = 10;   // microprogram address width (1K words)
  localparam int unsigned UW      = 60;   // microinstruction data part
  localparam int unsigned UNIB    = UW / 4;

  // ALU operations of a slice.
  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,   // A + B + cin
    ALU_SUB = 3'd1,   // A + ~B + cin  (A - B when cin = 1)
    ALU_AND = 3'd2,
    ALU_OR  = 3'd3,
    ALU_XOR = 3'd4
  } alu_op_e;

  typedef enum logic [1:0] {
    ASRC_GR   = 2'd0,  // general register selected by RW or RX
    ASRC_SP   = 2'd1,  // scratchpad port A
    ASRC_ZERO = 2'd2
  } a_src_e;

  typedef enum logic [1:0] {
    BSRC_SP   = 2'd0,  // scratchpad port B
    BSRC_RW   = 2'd1,  // RW as a short operand
    BSRC_RX   = 2'd2,  // RX as a short operand
    BSRC_ZERO = 2'd3
  } b_src_e;

  typedef enum logic [1:0] {
    DST_NONE = 2'd0,
    DST_GR   = 2'd1,   // general register selected by RW or RX
    DST_SP   = 2'd2    // scratchpad at port B address
  } dst_e;

  // Direction seen by one slice's shifter.
  typedef enum logic [1:0] {
    DIR_NONE  = 2'd0,
    DIR_LEFT  = 2'd1,
    DIR_RIGHT = 2'd2
  } sh_dir_e;

  // Shift applied by the shifter after the ALU (whole 16-bit data part).
  // Bits 3:2 are the direction lines themselves (sh_dir_e), wired to every
  // slice and the fix-up with no decoder; bits 1:0 choose the bit that
  // enters the end of the data part (0, the bit leaving the other end, or
  // the sign bit).
  typedef enum logic [3:0] {
    SH_NONE = {DIR_NONE,  2'd0},
    SH_SHL  = {DIR_LEFT,  2'd0},  // logical shift left 1
    SH_ROL  = {DIR_LEFT,  2'd1},  // rotate left 1
    SH_SHR  = {DIR_RIGHT, 2'd0},  // logical shift right 1
    SH_ROR  = {DIR_RIGHT, 2'd1},  // rotate right 1
    SH_SRA  = {DIR_RIGHT, 2'd2}   // arithmetic shift right 1
  } sh_op_e;

  // Who drives the D-bus.
  typedef enum logic [1:0] {
    DB_SLICES = 2'd0,  // shifter outputs of the five slices
    DB_CONST  = 2'd1,  // microprogram constant (data and check symbol)
    DB_IO     = 2'd2   // I/O data bus
  } dbus_src_e;

  // Check symbol fix-up for two-step logical operations.
  typedef enum logic [1:0] {
    FIX_NONE = 2'd0,
    FIX_SUB1 = 2'd1,   // subtract the generated residue once  (AND, OR)
    FIX_SUB2 = 2'd2    // subtract the generated residue twice (XOR)
  } fix_sub_e;

  typedef enum logic [2:0] {
    IO_NONE      = 3'd0,
    IO_BAR_READ  = 3'd1,  // BAR <- D-bus, R/W = read
    IO_BAR_WRITE = 3'd2,  // BAR <- D-bus, R/W = write
    IO_BDR       = 3'd3,  // BDR <- D-bus
    IO_MSYNC_ON  = 3'd4,
    IO_MSYNC_OFF = 3'd5
  } io_op_e;

  typedef enum logic [2:0] {
    SEQ_CONT  = 3'd0,  // next = upc + 1
    SEQ_JUMP  = 3'd1,  // next = lit
    SEQ_JCOND = 3'd2,  // next = cond ? lit : upc + 1
    SEQ_CALL  = 3'd3,  // push upc + 1, next = lit
    SEQ_RET   = 3'd4,  // next = pop
    SEQ_MAP   = 3'd5,  // next = {lit[9:8], opcode}
    SEQ_LDCNT = 3'd6,  // counter = lit, next = upc + 1
    SEQ_LOOP  = 3'd7   // counter -= 1; next = (counter != 0) ? lit : upc + 1
  } seq_op_e;

  typedef enum logic [2:0] {
    CC_TRUE  = 3'd0,
    CC_CARRY = 3'd1,   // latched carry
    CC_ZERO  = 3'd2,   // latched zero
    CC_SIGN  = 3'd3,   // latched sign
    CC_SSYNC = 3'd4,   // live I/O SSYNC
    CC_CNTZ  = 3'd5    // loop counter is zero
  } cond_e;

  // Microinstruction data part (60 bits = 15 ROM slices of 4 bits).
  typedef struct packed {
    logic        spare;
    seq_op_e     seq_op;
    cond_e       cond_sel;
    logic        cond_pol;    // 1: branch when the condition is false
    logic        cc_latch;    // latch carry, zero, sign into the sequencer
    io_op_e      io_op;
    logic        chk_en;      // this cycle's D-bus is checked next cycle
    fix_sub_e    fix_sub;
    dbus_src_e   dbus_src;
    logic        ld_rw;
    logic        ld_rx;
    logic        kd_data;     // data slices load from 0: D-bus, 1: K-bus
    logic        kd_chk;      // check slice loads from 0: D-bus, 1: K-bus
    dst_e        dst;
    sh_op_e      sh_op;
    logic        cin;
    logic [1:0]  spa;
    logic [1:0]  spb;
    logic        gr_sel_x;    // general register selected by 0: RW, 1: RX
    b_src_e      b_src;
    a_src_e      a_src;
    alu_op_e     alu_op;
    logic [19:0] lit;         // constant {check, data} or {.., address}
  } uword_t;

  // Control lines of one slice.
  typedef struct packed {
    alu_op_e    alu_op;
    a_src_e     a_src;
    b_src_e     b_src;
    logic       gr_sel_x;
    logic [1:0] spa;
    logic [1:0] spb;
    sh_dir_e    sh_dir;
    dst_e       dst;
    logic       kd_sel;
    logic       ld_rw;
    logic       ld_rx;
  } slice_ctl_t;

  // A coded data word as it travels on the D-bus.
  typedef struct packed {
    logic [CW-1:0] chk;
    logic [DW-1:0] data;
  } cword_t;

  // One's complement (end-around carry) addition of two 4-bit residues.
  function automatic logic [3:0] add_mod15(input logic [3:0] a, input logic [3:0] b);
    logic [4:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[3:0] + {3'b000, s[4]};
  endfunction

  // Map the two representations of zero (0000 and 1111) onto 0000.
  function automatic logic [3:0] canon15(input logic [3:0] a);
    return (a == 4'hF) ? 4'h0 : a;
  endfunction

  // Residue of a 16-bit word modulo 15, canonical (0..14).
  function automatic logic [3:0] residue16(input logic [15:0] d);
    return canon15(add_mod15(add_mod15(d[3:0], d[7:4]), add_mod15(d[11:8], d[15:12])));
  endfunction

  // Two-rail checker cell: both input pairs complementary gives a
  // complementary output pair; any non-complementary input pair gives 00/11.
  function automatic logic [1:0] trc(input logic [1:0] x, input logic [1:0] y);
    return {(x[1] & y[1]) | (x[0] & y[0]), (x[1] & y[0]) | (x[0] & y[1])};
  endfunction

  // Bitwise XOR of all nibbles of a microinstruction data part.
  function automatic logic [3:0] uparity(input logic [UW-1:0] w);
    logic [3:0] p;
    p = '0;
    for (int i = 0; i < UNIB; i++) p ^= w[4*i +: 4];
    return p;
  endfunction

endpackage
