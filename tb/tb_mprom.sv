// tb_mprom: the microprogram memory returns the addressed word (data part
// and check nibble) in its data register one clock after the address, and
// with repair enabled it rebuilds the output of a failed 4-bit ROM from the
// other ROMs and the check ROM. The ROM array is preloaded by the
// testbench with random code words.
module tb_mprom;
  import scamp_pkg::*;
  localparam int DEPTH = 1024;
  logic clk = 0, rst_n = 0;
  logic [9:0] addr;
  logic repair_en;
  logic [3:0] repair_idx, mdr_check;
  logic [UW-1:0] mdr_data;
  logic [UW+3:0] golden [DEPTH];
  int checks = 0, failures = 0;

  mprom dut (.clk, .rst_n, .addr, .repair_en, .repair_idx, .mdr_data, .mdr_check);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      logic [UW-1:0] d;
      d = {$urandom, $urandom};
      golden[i] = {uparity(d), d};
      dut.rom[i] = golden[i];
    end
    addr = 0; repair_en = 0; repair_idx = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      int a, bad;
      @(negedge clk);
      a = $urandom % DEPTH;
      addr = 10'(a);
      repair_en = (n >= 300);
      repair_idx = 4'($urandom % UNIB);
      if (repair_en) begin
        // the failed package returns garbage
        bad = int'(repair_idx);
        dut.rom[a][4*bad +: 4] = ~golden[a][4*bad +: 4];
      end
      @(negedge clk);
      checks++;
      if ({mdr_check, mdr_data} != golden[a]) begin
        failures++;
        if (failures < 10) $display("n=%0d addr=%0d got %h exp %h", n, a, {mdr_check, mdr_data}, golden[a]);
      end
      dut.rom[a] = golden[a];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
