// tb_fixup: checks the fix-up equations against true two's complement
// arithmetic. For random 16-bit operands the testbench forms the operands'
// mod-15 check symbols, models the check slice (4-bit add/subtract with
// carry out, 4-bit rotation) and the data part (16-bit add/subtract and
// shifts) independently, and expects the fix-up output to equal the mod-15
// residue of the true 16-bit result. It also checks the second step of
// two-step AND, OR and XOR, and pass-through of a constant.
module tb_fixup;
  import scamp_pkg::*;
  logic [3:0] v, gen, t;
  logic arith, c4, cout16, sin, sout;
  sh_dir_e sh_dir;
  fix_sub_e fix_sub;
  int checks = 0, failures = 0;

  fixup dut (.v, .arith, .c4, .cout16, .sh_dir, .sin, .sout, .fix_sub, .gen, .t);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] r15(input logic [15:0] d);
    return 4'(int'(d) % 15);
  endfunction

  task automatic expect_t(input logic [3:0] exp, input string what);
    #1;
    checks++;
    if (t != exp) begin
      failures++;
      if (failures < 20) $display("%s: t=%0d expected %0d", what, t, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [15:0] a, b, f, res;
      logic [3:0] ac, bc, s4;
      logic [4:0] s5;
      logic [16:0] f17;
      logic ci, sub;
      int sh;
      a = 16'($urandom); b = 16'($urandom);
      if (n % 7 == 0) b = 16'hFFFF - a;     // exercise carries into all ones
      ac = r15(a); bc = r15(b);
      if ($urandom % 4 == 0) ac = (ac == 0) ? 4'hF : ac;  // other zero form
      ci = 1'($urandom); sub = 1'($urandom);
      if (sub) begin
        f17 = {1'b0, a} + {1'b0, ~b} + 17'(ci);
        s5  = {1'b0, ac} + {1'b0, ~bc} + 5'(ci);
      end else begin
        f17 = {1'b0, a} + {1'b0, b} + 17'(ci);
        s5  = {1'b0, ac} + {1'b0, bc} + 5'(ci);
      end
      f = f17[15:0];
      s4 = s5[3:0];
      sh = $urandom % 6;
      arith = 1; c4 = s5[4]; cout16 = f17[16]; fix_sub = FIX_NONE; gen = 4'($urandom % 15);
      unique case (sh)
        0: begin sh_dir = DIR_NONE; res = f; v = s4; sin = 0; sout = 0; end
        1: begin sh_dir = DIR_LEFT; res = {f[14:0], f[15]}; sin = f[15]; sout = f[15]; v = {s4[2:0], s4[3]}; end
        2: begin sh_dir = DIR_LEFT; res = {f[14:0], 1'b0}; sin = 0; sout = f[15]; v = {s4[2:0], s4[3]}; end
        3: begin sh_dir = DIR_RIGHT; res = {f[0], f[15:1]}; sin = f[0]; sout = f[0]; v = {s4[0], s4[3:1]}; end
        4: begin sh_dir = DIR_RIGHT; res = {1'b0, f[15:1]}; sin = 0; sout = f[0]; v = {s4[0], s4[3:1]}; end
        default: begin sh_dir = DIR_RIGHT; res = {f[15], f[15:1]}; sin = f[15]; sout = f[0]; v = {s4[0], s4[3:1]}; end
      endcase
      expect_t(r15(res), $sformatf("arith sub=%0d sh=%0d a=%h b=%h", sub, sh, a, b));

      // two-step logical operation, second step
      sh_dir = DIR_NONE; sin = 0; sout = 0; cout16 = 0;
      s5 = {1'b0, ac} + {1'b0, bc};
      v = s5[3:0]; c4 = s5[4];
      gen = r15(a | b); fix_sub = FIX_SUB1; expect_t(r15(a & b), "AND");
      gen = r15(a & b); fix_sub = FIX_SUB1; expect_t(r15(a | b), "OR");
      gen = r15(a & b); fix_sub = FIX_SUB2; expect_t(r15(a ^ b), "XOR");

      // constant on the D-bus: passed through
      arith = 0; fix_sub = FIX_NONE; c4 = 1'($urandom); cout16 = 1'($urandom);
      v = ac; expect_t(r15(a), "pass");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
