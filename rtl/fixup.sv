// fixup: check symbol fix-up unit at the output of the SCAMP check slice.
//
// The check slice performs the same ALU and shift operation on the 4-bit
// check symbols as the data slices perform on the data part, but a 4-bit
// adder and a 4-bit rotation only give the mod-15 residue of a one's
// complement result. This unit turns the check slice output v into the
// mod-15 residue of the two's complement, 16-bit result:
//
//   adder correction  delta = c4 - cout16
//       c4 is the check slice carry out (worth 16 = 1 mod 15), cout16 the
//       carry out of the data part (worth 2^16 = 1 mod 15, dropped by two's
//       complement arithmetic).
//   shift correction  s = sin - sout, the bits shifted into and out of the
//       16-bit data part (zero for rotations). The check slice always rotates
//       its own 4 bits, which multiplies by 2 (left) or by 2^-1 = 8 (right).
//
//   no shift:   t = v + delta
//   left:       t = v + 2*delta + s
//   right:      t = v + 8*delta + 8*s
//
// and, for the second step of a two-step logical operation, subtracts the
// residue gen of the first step's result once (AND, OR: A and B = A + B -
// (A or B), A or B = A + B - (A and B)) or twice (XOR: A xor B = A + B -
// 2(A and B)). All sums are reduced modulo 15 and the output is canonical
// (0..14). When the slices do not drive the D-bus (arith = 0), v is passed
// through unchanged apart from the optional subtraction.
//
// That the fix-up follows the check slice, uses the carries and shift bits
// and subtracts the generated residue is the document's; the exact equations
// are derived here from the residue code and the slice wiring.
// Combinational.
module fixup
  import scamp_pkg::*;
(
  input  logic [3:0] v,       // check nibble on the D-bus
  input  logic       arith,   // the slices drive the D-bus this cycle
  input  logic       c4,      // check slice carry out
  input  logic       cout16,  // data part carry out
  input  sh_dir_e    sh_dir,
  input  logic       sin,     // bit shifted into the data part
  input  logic       sout,    // bit shifted out of the data part
  input  fix_sub_e   fix_sub,
  input  logic [3:0] gen,     // generated residue of the previous D-bus word
  output logic [3:0] t
);
  always_comb begin
    int signed delta, s, md, ms, kf, sum;
    delta = arith ? (int'(c4) - int'(cout16)) : 0;
    s     = arith ? (int'(sin) - int'(sout)) : 0;
    unique case (sh_dir)
      DIR_LEFT:  begin md = 2; ms = 1; end
      DIR_RIGHT: begin md = 8; ms = 8; end
      default:   begin md = 1; ms = 0; end
    endcase
    unique case (fix_sub)
      FIX_SUB1: kf = 1;
      FIX_SUB2: kf = 2;
      default:  kf = 0;
    endcase
    sum = int'(v) + md * delta + ms * s - kf * int'(gen) + 60;
    t   = 4'(sum % 15);
  end
endmodule
