// dpath_checker: the single data path checker of SCAMP.
//
// Every data transfer in SCAMP goes over the D-bus, so one checker covers
// all data. At the end of each microcycle the 16-bit data part of the D-bus
// is latched into a check register, together with the fixed-up check symbol
// (a 4-bit check register) and the microprogram's check-enable bit. During
// the next microcycle the residue generator forms the mod-15 residue of the
// latched data part and a totally self-checking equality checker compares it
// with the latched check symbol, so checking overlaps the next operation.
//
// The generated residue (gen) also goes to the fix-up unit, which subtracts
// it in the second step of a two-step logical operation; for the first step
// the microprogram clears chk_en, because the check symbol of that
// intermediate word is not computed. When the latched word is not to be
// checked, the checker compares the generated residue with itself, so its
// output stays a valid two-rail code.
//
// Check registers, residue generator and equality checker follow the
// document's data path checking figure; the check-enable bit and how it is
// applied are this design's choice. Registers reset to a valid (all-zero)
// code word with checking disabled.
module dpath_checker
  import scamp_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] dbus_data,   // data part of the D-bus
  input  logic [CW-1:0] fix_t,       // fix-up unit output
  input  logic          chk_en,      // check this microcycle's D-bus word
  output logic [CW-1:0] gen,         // residue of the latched data part
  output logic [1:0]    z,           // two-rail result
  output logic          err          // z is not a valid two-rail pair
);
  logic [DW-1:0] creg_d;
  logic [CW-1:0] creg_c;
  logic          creg_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      creg_d <= '0;
      creg_c <= '0;
      creg_v <= 1'b0;
    end else begin
      creg_d <= dbus_data;
      creg_c <= fix_t;
      creg_v <= chk_en;
    end
  end

  residue_gen #(.NIBBLES(DW / 4)) u_gen (.data(creg_d), .residue(gen));

  tsc_eq_checker #(.N(CW)) u_eq (
    .a (gen),
    .b (creg_v ? creg_c : gen),
    .z (z)
  );

  assign err = (z[1] == z[0]);
endmodule
