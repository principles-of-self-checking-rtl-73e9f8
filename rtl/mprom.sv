// mprom: SCAMP microprogram memory with its check ROM and microprogram data
// register.
//
// The microprogram is DEPTH words of NROM 4-bit ROM slices (the data part,
// 60 bits) plus one 4-bit check ROM. The check nibble of each word is the
// bitwise XOR of its data nibbles (distance-2 4-adjacent code), so a failure
// of any one ROM package is detectable. The word addressed by the sequencer
// is loaded into the microprogram data register (mdr) at each clock edge.
//
// Repair: when repair_en is set, the output of ROM package repair_idx
// (0..NROM-1 for a data ROM) is replaced by the XOR of all the other ROM
// outputs, check ROM included. This is the reconstruction the document
// describes for a failed ROM, done by the existing parity logic; in the
// original it is a change of sockets and jumpers, here it is an input.
// While repaired, the microprogram code no longer detects errors.
//
// The ROM array has no write port. Its content comes from INIT_FILE
// ($readmemh, one 64-bit word per line: check nibble in bits 63:60) when
// given, otherwise it is empty (all zero, which is a code word); a
// testbench may also preload the array. The word size and the repair input
// are this design's choice; 1K-word by 4-bit ROMs and the extra check ROM
// follow the document.
module mprom
  import scamp_pkg::*;
#(
  parameter int unsigned DEPTH     = 1024,
  parameter int unsigned NROM      = UNIB,
  parameter string       INIT_FILE = ""
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic                    repair_en,
  input  logic [3:0]              repair_idx,
  output logic [4*NROM-1:0]       mdr_data,   // data part of the microinstruction
  output logic [3:0]              mdr_check   // its check nibble
);
  logic [4*NROM+3:0] rom [DEPTH];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end

  logic [4*NROM+3:0] word, fixed;
  logic [3:0]        others;

  assign word = rom[addr];

  always_comb begin
    others = word[4*NROM +: 4];
    for (int i = 0; i < NROM; i++)
      if (i != int'(repair_idx)) others ^= word[4*i +: 4];
    fixed = word;
    for (int i = 0; i < NROM; i++)
      if (repair_en && i == int'(repair_idx)) fixed[4*i +: 4] = others;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mdr_data  <= '0;
      mdr_check <= '0;
    end else begin
      mdr_data  <= fixed[4*NROM-1:0];
      mdr_check <= fixed[4*NROM +: 4];
    end
  end
endmodule
