// tb_useq: directed test of the microprogram sequencer commands. A small
// behavioural model of the next-address rule runs beside the sequencer and
// random commands, conditions and literals are applied; next_addr is
// compared every cycle. Every command and every condition is counted and
// must occur.
module tb_useq;
  import scamp_pkg::*;
  logic clk = 0, rst_n = 0;
  seq_op_e seq_op;
  cond_e cond_sel;
  logic cond_pol, cc_latch, carry, zero, sign, ssync;
  logic [9:0] lit, next_addr;
  logic [7:0] opcode;
  int checks = 0, failures = 0;
  int seen [8];

  useq dut (.clk, .rst_n, .seq_op, .cond_sel, .cond_pol, .cc_latch, .lit, .opcode,
            .carry, .zero, .sign, .ssync, .next_addr);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [9:0] m_upc, m_cnt;
  logic [9:0] m_stk [$];
  logic m_c, m_z, m_s;

  initial begin
    m_upc = '1; m_cnt = 0; m_c = 0; m_z = 0; m_s = 0;
    seq_op = SEQ_CONT; cond_sel = CC_TRUE; cond_pol = 0; cc_latch = 0;
    carry = 0; zero = 0; sign = 0; ssync = 0; lit = 0; opcode = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    #1 checks++;
    if (next_addr != 0) begin failures++; $display("first address after reset is %0d", next_addr); end
    m_upc = 0;  // the next edge fetches address 0
    for (int n = 0; n < 3000; n++) begin
      logic c;
      logic [9:0] exp;
      @(negedge clk);
      seq_op = seq_op_e'($urandom % 8);
      if (seq_op == SEQ_CALL && m_stk.size() == 4) seq_op = SEQ_CONT;
      if (seq_op == SEQ_RET && m_stk.size() == 0) seq_op = SEQ_CONT;
      if (seq_op == SEQ_LDCNT) lit = 10'($urandom % 5); else lit = 10'($urandom);
      cond_sel = cond_e'($urandom % 6);
      cond_pol = 1'($urandom);
      cc_latch = 1'($urandom);
      carry = 1'($urandom); zero = 1'($urandom); sign = 1'($urandom); ssync = 1'($urandom);
      opcode = 8'($urandom);
      case (cond_sel)
        CC_CARRY: c = m_c;
        CC_ZERO:  c = m_z;
        CC_SIGN:  c = m_s;
        CC_SSYNC: c = ssync;
        CC_CNTZ:  c = (m_cnt == 0);
        default:  c = 1;
      endcase
      c ^= cond_pol;
      case (seq_op)
        SEQ_JUMP:  exp = lit;
        SEQ_JCOND: exp = c ? lit : m_upc + 1;
        SEQ_CALL:  exp = lit;
        SEQ_RET:   exp = m_stk[$];
        SEQ_MAP:   exp = {lit[9:8], opcode};
        SEQ_LOOP:  exp = (m_cnt - 10'd1 != 0) ? lit : m_upc + 1;
        default:   exp = m_upc + 1;
      endcase
      #1;
      checks++;
      seen[int'(seq_op)]++;
      if (next_addr != exp) begin
        failures++;
        if (failures < 10) $display("n=%0d op=%s next=%0d exp=%0d", n, seq_op.name(), next_addr, exp);
      end
      @(posedge clk);
      if (seq_op == SEQ_CALL) m_stk.push_back(m_upc + 1);
      if (seq_op == SEQ_RET) void'(m_stk.pop_back());
      if (seq_op == SEQ_LDCNT) m_cnt = lit;
      if (seq_op == SEQ_LOOP) m_cnt = m_cnt - 1;
      if (cc_latch) begin m_c = carry; m_z = zero; m_s = sign; end
      m_upc = exp;
    end
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("command %0d never issued", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
