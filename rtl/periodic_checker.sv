// periodic_checker: clock checker for SCAMP.
//
// The document has the common clock monitored by a totally self-checking
// periodic signal checker taken from the literature, without giving its
// circuit. This design builds the simplest digital equivalent: the
// monitored clock is sampled in the domain of an independent reference
// clock (ref_clk, assumed at least 4 times faster) through a two-flop
// synchroniser, and the number of reference cycles between rising edges of
// the monitored clock is counted. A period longer than MAX_GAP reference
// cycles (clock stopped or too slow) or shorter than MIN_GAP (too fast)
// sets a sticky error, cleared only by reset.
//
// The output is a two-rail pair like the other checkers: 10 while the clock
// is good, 00 after an error. The counting scheme and the limits are this
// design's choices.
module periodic_checker #(
  parameter int unsigned MIN_GAP = 2,
  parameter int unsigned MAX_GAP = 16
) (
  input  logic       ref_clk,
  input  logic       rst_n,
  input  logic       mon_clk,
  output logic [1:0] z,
  output logic       err
);
  localparam int unsigned CNTW = $clog2(MAX_GAP + 2);

  logic [2:0]      sync;
  logic [CNTW-1:0] cnt;
  logic            seen;   // a first rising edge was seen
  logic            bad;
  logic            rise;

  assign rise = sync[1] & ~sync[2];

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      sync <= '0;
      cnt  <= '0;
      seen <= 1'b0;
      bad  <= 1'b0;
    end else begin
      sync <= {sync[1:0], mon_clk};
      if (rise) begin
        if (seen && cnt < CNTW'(MIN_GAP)) bad <= 1'b1;
        cnt  <= '0;
        seen <= 1'b1;
      end else if (cnt <= CNTW'(MAX_GAP)) begin
        cnt <= cnt + 1'b1;
      end else begin
        bad <= 1'b1;
      end
    end
  end

  assign err = bad;
  assign z   = bad ? 2'b00 : 2'b10;
endmodule
