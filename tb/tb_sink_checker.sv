// tb_sink_checker: the sink register checker must stay quiet for code words
// (check nibble = XOR of the 15 data nibbles) and flag, one cycle later, a
// word with one corrupted control line or a corrupted 4-bit slice.
module tb_sink_checker;
  import scamp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [UW-1:0] ctl;
  logic [3:0] chk;
  logic [1:0] z;
  logic err;
  int checks = 0, failures = 0;

  sink_checker dut (.clk, .rst_n, .ctl_sink(ctl), .check_sym(chk), .z, .err);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] par(input logic [UW-1:0] w);
    logic [3:0] p = 0;
    for (int i = 0; i < UW; i++) p[i % 4] ^= w[i];
    return p;
  endfunction

  initial begin
    ctl = '0; chk = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      logic bad;
      @(negedge clk);
      ctl = {$urandom, $urandom};
      chk = par(ctl);
      bad = 0;
      if (n % 3 == 1) begin
        int bitpos;
        bitpos = $urandom % UW;
        ctl[bitpos] = ~ctl[bitpos];
        bad = 1;
      end
      else if (n % 3 == 2) begin
        int s;
        logic [3:0] e;
        s = $urandom % UNIB;
        e = 4'($urandom % 15 + 1);
        ctl[4*s +: 4] ^= e; bad = 1;
      end
      @(negedge clk);
      checks++;
      if (err != bad) begin
        failures++;
        $display("n=%0d err=%b expected %b", n, err, bad);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
