// residue_gen: modulo-15 residue generator for the SCAMP data path checker.
//
// The 16-bit data part is cut into four 4-bit bytes, which are added by a
// two-level tree of 4-bit one's complement (end-around carry) adders, as the
// document prescribes for a low-cost residue code with check base 2^4 - 1
// (a k-byte tree of modulo 2^b - 1 adders). Since 16 = 1 mod 15, the sum of
// the bytes modulo 15 is the residue of the word. The last stage maps the
// second representation of zero (1111) to 0000, so the output is canonical
// (0..14); that mapping is this design's choice, made so that the result can
// be compared bit for bit with the fix-up unit's output.
//
// Purely combinational; in SCAMP it sits behind the check register and its
// result is used one microcycle after the D-bus word was latched.
module residue_gen #(
  parameter int unsigned NIBBLES = 4
) (
  input  logic [4*NIBBLES-1:0] data,
  output logic [3:0]           residue
);
  import scamp_pkg::*;

  always_comb begin
    logic [3:0] acc;
    acc = 4'h0;
    for (int i = 0; i < NIBBLES; i++) acc = add_mod15(acc, data[4*i +: 4]);
    residue = canon15(acc);
  end
endmodule
