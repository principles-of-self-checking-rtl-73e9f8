// tb_residue_gen: exhaustive test of the mod-15 residue generator. Every
// 16-bit word is applied and the output is compared with the word modulo 15
// computed with the integer % operator.
module tb_residue_gen;
  logic [15:0] data;
  logic [3:0]  residue;
  int checks = 0, failures = 0;

  residue_gen dut (.data, .residue);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      data = 16'(i);
      #1;
      checks++;
      if (residue != 4'(i % 15)) begin
        failures++;
        if (failures < 10) $display("mismatch: %h -> %0d, expected %0d", data, residue, i % 15);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
