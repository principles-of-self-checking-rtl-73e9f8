// tb_tsc_eq_checker: exhaustive test of the 4-bit two-rail equality checker.
// For every pair of words the output must be a valid two-rail code (01/10)
// exactly when the words are equal.
module tb_tsc_eq_checker;
  logic [3:0] a, b;
  logic [1:0] z;
  int checks = 0, failures = 0;

  tsc_eq_checker #(.N(4)) dut (.a, .b, .z);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i);
        b = 4'(j);
        #1;
        checks++;
        if ((z[1] != z[0]) != (i == j)) begin
          failures++;
          $display("a=%h b=%h z=%b", a, b, z);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
