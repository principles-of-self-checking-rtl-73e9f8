// tb_scamp_slice: random-operation test of one 4-bit slice against a
// behavioural model kept in the testbench (16 general registers, 4
// scratchpads, RW, RX). Each cycle a random control word, random bus nibbles
// and carry/shift inputs are applied; D output, carry out and shift outputs
// are compared before the clock edge and the model is updated at the edge.
// Register contents become visible through later reads, so writes are
// checked too.
module tb_scamp_slice;
  import scamp_pkg::*;
  logic clk = 0, rst_n = 0;
  slice_ctl_t ctl;
  logic [3:0] w, x, k, d_in, d_out;
  logic cin, cout, sh_in_l, sh_in_r, sh_out_l, sh_out_r;
  int checks = 0, failures = 0;

  scamp_slice dut (.clk, .rst_n, .ctl, .w, .x, .k, .d_in, .cin, .cout, .sh_in_l, .sh_in_r,
                   .sh_out_l, .sh_out_r, .d_out);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] mgr [16];
  logic [3:0] msp [4];
  logic [3:0] mrw, mrx;

  task automatic chk(input logic [4:0] got, input logic [4:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) mgr[i] = 0;
    for (int i = 0; i < 4; i++) msp[i] = 0;
    mrw = 0; mrx = 0;
    ctl = '0; w = 0; x = 0; k = 0; d_in = 0; cin = 0; sh_in_l = 0; sh_in_r = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      logic [3:0] a, b, f, sel, exp_d, wd;
      logic [4:0] s;
      logic co;
      @(negedge clk);
      ctl.alu_op   = alu_op_e'($urandom % 5);
      ctl.a_src    = a_src_e'($urandom % 3);
      ctl.b_src    = b_src_e'($urandom % 4);
      ctl.gr_sel_x = 1'($urandom);
      ctl.spa      = 2'($urandom);
      ctl.spb      = 2'($urandom);
      ctl.sh_dir   = sh_dir_e'($urandom % 3);
      ctl.dst      = dst_e'($urandom % 3);
      ctl.kd_sel   = 1'($urandom);
      ctl.ld_rw    = ($urandom % 4) == 0;
      ctl.ld_rx    = ($urandom % 4) == 0;
      w = 4'($urandom); x = 4'($urandom); k = 4'($urandom); d_in = 4'($urandom);
      cin = 1'($urandom); sh_in_l = 1'($urandom); sh_in_r = 1'($urandom);
      // model
      sel = ctl.gr_sel_x ? mrx : mrw;
      a = (ctl.a_src == ASRC_GR) ? mgr[sel] : (ctl.a_src == ASRC_SP) ? msp[ctl.spa] : 4'h0;
      b = (ctl.b_src == BSRC_SP) ? msp[ctl.spb] : (ctl.b_src == BSRC_RW) ? mrw :
          (ctl.b_src == BSRC_RX) ? mrx : 4'h0;
      co = 0;
      case (ctl.alu_op)
        ALU_ADD: begin s = a + b + cin; f = s[3:0]; co = s[4]; end
        ALU_SUB: begin s = a + (4'hF - b) + cin; f = s[3:0]; co = s[4]; end
        ALU_AND: f = a & b;
        ALU_OR:  f = a | b;
        default: f = a ^ b;
      endcase
      exp_d = (ctl.sh_dir == DIR_LEFT) ? {f[2:0], sh_in_l} :
              (ctl.sh_dir == DIR_RIGHT) ? {sh_in_r, f[3:1]} : f;
      #1;
      chk({1'b0, d_out}, {1'b0, exp_d}, $sformatf("d_out n=%0d", n));
      chk({4'b0, cout}, {4'b0, co}, "cout");
      chk({3'b0, sh_out_l, sh_out_r}, {3'b0, f[3], f[0]}, "shift outs");
      @(posedge clk);
      wd = ctl.kd_sel ? k : d_in;
      if (ctl.dst == DST_GR) mgr[sel] = wd;
      if (ctl.dst == DST_SP) msp[ctl.spb] = wd;
      if (ctl.ld_rw) mrw = w;
      if (ctl.ld_rx) mrx = x;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
