// sink_checker: sink register and microprogram code checker of SCAMP.
//
// Checking that the microprogram data register holds a code word does not
// show that the control lines reached the slices. So the control lines are
// collected again at their destinations into a sink register, and the sink
// register, together with the check symbol of the same microinstruction, is
// checked against the microprogram code. The code is distance-2 4-adjacent:
// the check nibble is the bitwise XOR of the 15 data nibbles, so any error
// confined to one 4-bit ROM slice, or to one routed control line, gives a
// non-zero syndrome. The checker is four 15-input XOR trees and a 4-bit
// totally self-checking equality checker, as the document gives for this
// code.
//
// The sink register and the check nibble are latched at the end of the
// microcycle in which the control lines were used, and checked during the
// next microcycle. Latching the check nibble alongside, so that the sink
// register is compared with its own microinstruction's check symbol, is this
// design's choice. Resets to the all-zero word, which is a code word.
module sink_checker
  import scamp_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic [UW-1:0] ctl_sink,    // control lines as seen at their destinations
  input  logic [3:0]    check_sym,   // check nibble from the microprogram data register
  output logic [1:0]    z,
  output logic          err
);
  logic [UW-1:0] sink_q;
  logic [3:0]    chk_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sink_q <= '0;
      chk_q  <= '0;
    end else begin
      sink_q <= ctl_sink;
      chk_q  <= check_sym;
    end
  end

  tsc_eq_checker #(.N(4)) u_eq (.a(uparity(sink_q)), .b(chk_q), .z(z));

  assign err = (z[1] == z[0]);
endmodule
