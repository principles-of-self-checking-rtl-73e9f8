// tsc_eq_checker: totally self-checking equality checker with a two-rail
// output.
//
// Each bit pair (a[i], ~b[i]) forms a two-rail signal that is complementary
// exactly when a[i] == b[i]. The pairs are reduced by a chain of two-rail
// checker cells (scamp_pkg::trc). The output pair z is 01 or 10 when the two
// words are equal, and 00 or 11 when they differ in any bit, so a stuck
// output line is itself exposed as an error by normal operation.
//
// The document uses such checkers on the D-bus check symbol, on the
// microprogram check symbol and between the duplicated sequencers, and
// takes their design from the literature; the two-rail cell chain used here
// is the standard construction and is this design's choice.
// Combinational, no clock.
module tsc_eq_checker #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [1:0]   z
);
  import scamp_pkg::*;

  always_comb begin
    z = {a[0], ~b[0]};
    for (int i = 1; i < N; i++) z = trc(z, {a[i], ~b[i]});
  end
endmodule
