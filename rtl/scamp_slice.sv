// scamp_slice: one 4-bit data path slice of SCAMP.
//
// Five identical slices make the data paths: four carry the 16-bit data part
// and the fifth carries the 4-bit check symbol. A slice holds 16 general
// registers, 4 scratchpad registers (a two-port file: port A and port B can
// read two different scratchpads in one microcycle), and the RW and RX
// registers, which are loaded from the W and X inputs and select the general
// register that is read as ALU operand A and/or written. RW and RX can also
// be ALU operand B, as short operands. The ALU result passes through a
// one-bit shifter to the slice's D output. A general register or scratchpad
// is loaded from either the D-bus nibble (d_in) or the K-bus nibble (k), as
// chosen by ctl.kd_sel.
//
// Carry (cin/cout) and shift bits (sh_in_*/sh_out_*) chain the slices; the
// board wiring in scamp_top decides what enters at the ends. The D-bus is
// three-state in the document; here the output enable is a multiplexer in
// scamp_top, so d_out is always driven.
//
// The register counts and the data flow follow the document's slice
// organisation. The ALU operation set, the operand source encodings, the
// choice of scratchpad port B as the scratchpad write address and the reset
// of all registers to zero (a valid code word in every slice) are this
// design's choices.
//
// Timing: ALU, shifter and d_out are combinational from the registers and
// ctl in the same microcycle; registers are written at the rising clock edge
// that ends the microcycle.
module scamp_slice
  import scamp_pkg::*;
#(
  parameter int unsigned GREGS   = 16,
  parameter int unsigned SCRATCH = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  slice_ctl_t ctl,
  input  logic [3:0] w,        // RW load value
  input  logic [3:0] x,        // RX load value
  input  logic [3:0] k,        // K-bus nibble
  input  logic [3:0] d_in,     // D-bus nibble, for register loads
  input  logic       cin,
  output logic       cout,
  input  logic       sh_in_l,  // enters bit 0 on a left shift
  input  logic       sh_in_r,  // enters bit 3 on a right shift
  output logic       sh_out_l, // ALU bit 3 (leaves on a left shift)
  output logic       sh_out_r, // ALU bit 0 (leaves on a right shift)
  output logic [3:0] d_out
);
  logic [3:0] gr [GREGS];
  logic [3:0] sp [SCRATCH];
  logic [3:0] rw, rx;
  logic [3:0] gsel;
  logic [3:0] a, b, f;

  assign gsel = ctl.gr_sel_x ? rx : rw;

  always_comb begin
    unique case (ctl.a_src)
      ASRC_GR: a = gr[gsel];
      ASRC_SP: a = sp[ctl.spa];
      default: a = 4'h0;
    endcase
    unique case (ctl.b_src)
      BSRC_SP: b = sp[ctl.spb];
      BSRC_RW: b = rw;
      BSRC_RX: b = rx;
      default: b = 4'h0;
    endcase
  end

  always_comb begin
    cout = 1'b0;
    unique case (ctl.alu_op)
      ALU_ADD: {cout, f} = {1'b0, a} + {1'b0, b} + {4'b0000, cin};
      ALU_SUB: {cout, f} = {1'b0, a} + {1'b0, ~b} + {4'b0000, cin};
      ALU_AND: f = a & b;
      ALU_OR:  f = a | b;
      ALU_XOR: f = a ^ b;
      default: f = a;
    endcase
  end

  assign sh_out_l = f[3];
  assign sh_out_r = f[0];

  always_comb begin
    unique case (ctl.sh_dir)
      DIR_LEFT:  d_out = {f[2:0], sh_in_l};
      DIR_RIGHT: d_out = {sh_in_r, f[3:1]};
      default:   d_out = f;
    endcase
  end

  logic [3:0] wdata;
  assign wdata = ctl.kd_sel ? k : d_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < GREGS; i++) gr[i] <= 4'h0;
      for (int i = 0; i < SCRATCH; i++) sp[i] <= 4'h0;
      rw <= 4'h0;
      rx <= 4'h0;
    end else begin
      if (ctl.dst == DST_GR) gr[gsel] <= wdata;
      if (ctl.dst == DST_SP) sp[ctl.spb] <= wdata;
      if (ctl.ld_rw) rw <= w;
      if (ctl.ld_rx) rx <= x;
    end
  end
endmodule
