// tb_dpath_checker: words with a correct check symbol pass, a word whose
// check symbol is wrong is flagged one microcycle after it was on the D-bus,
// and a word marked not-to-check is never flagged. The residue output must
// be the residue of the previous cycle's word.
module tb_dpath_checker;
  import scamp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] d;
  logic [3:0] fix_t, gen;
  logic chk_en, err;
  logic [1:0] z;
  int checks = 0, failures = 0;

  dpath_checker dut (.clk, .rst_n, .dbus_data(d), .fix_t, .chk_en, .gen, .z, .err);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 0; fix_t = 0; chk_en = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      logic [15:0] dd;
      logic bad, en;
      @(negedge clk);
      dd = 16'($urandom);
      d = dd;
      en = ($urandom % 4) != 0;
      chk_en = en;
      fix_t = 4'(int'(dd) % 15);
      bad = 0;
      if ($urandom % 2) begin
        fix_t = 4'((int'(fix_t) + 1 + $urandom % 14) % 15);
        bad = en;
      end
      @(negedge clk);
      checks++;
      if (err != bad) begin failures++; $display("n=%0d err=%b exp %b", n, err, bad); end
      checks++;
      if (gen != 4'(int'(dd) % 15)) begin failures++; $display("gen wrong"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
