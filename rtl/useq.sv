// useq: SCAMP microprogram sequencer (one of the two identical copies).
//
// The sequencer holds the address of the microinstruction now in the
// microprogram data register (upc) and computes the next address from the
// command field, the conditions and the literal field of that
// microinstruction. next_addr goes straight to the microprogram memory and
// is also what the two copies' equality checker compares.
//
// Commands: continue, jump, conditional jump, subroutine call and return
// (a STACK-deep return stack), opcode map (the 8-bit opcode from the high
// half of the D-bus is placed in the low address bits, lit[9:8] above it),
// load loop counter, and loop (decrement the counter, branch while it is
// not zero). The loop counter bounds I/O waits and multiply/divide loops.
// Condition code latches keep carry, zero and sign of the data paths when
// cc_latch is set. SSYNC and counter-zero are tested live.
//
// The document requires a microprogram address register, next-address
// logic, conditional branching on data path status, opcode decoding, a
// loop counter and a subroutine stack; it takes the sequencer itself from
// a single-chip design published elsewhere. The command encoding, stack
// depth and the map format here are this design's choices.
// Reset sets upc to all ones so that the first fetched address is 0.
module useq
  import scamp_pkg::*;
#(
  parameter int unsigned STACK = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  seq_op_e        seq_op,
  input  cond_e          cond_sel,
  input  logic           cond_pol,
  input  logic           cc_latch,
  input  logic [UAW-1:0] lit,
  input  logic [7:0]     opcode,
  input  logic           carry,
  input  logic           zero,
  input  logic           sign,
  input  logic           ssync,
  output logic [UAW-1:0] next_addr
);
  logic [UAW-1:0] upc, cnt;
  logic [UAW-1:0] stk [STACK];
  logic [$clog2(STACK)-1:0] sp;
  logic c_q, z_q, s_q;
  logic cond;
  logic [UAW-1:0] inc;

  assign inc = upc + 1'b1;

  always_comb begin
    unique case (cond_sel)
      CC_CARRY: cond = c_q;
      CC_ZERO:  cond = z_q;
      CC_SIGN:  cond = s_q;
      CC_SSYNC: cond = ssync;
      CC_CNTZ:  cond = (cnt == '0);
      default:  cond = 1'b1;
    endcase
    cond ^= cond_pol;
  end

  always_comb begin
    unique case (seq_op)
      SEQ_JUMP:  next_addr = lit;
      SEQ_JCOND: next_addr = cond ? lit : inc;
      SEQ_CALL:  next_addr = lit;
      SEQ_RET:   next_addr = stk[sp - 1'b1];
      SEQ_MAP:   next_addr = {lit[UAW-1:8], opcode};
      SEQ_LOOP:  next_addr = (cnt != 1) ? lit : inc;
      default:   next_addr = inc;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upc <= '1;
      cnt <= '0;
      sp  <= '0;
      c_q <= 1'b0;
      z_q <= 1'b0;
      s_q <= 1'b0;
      for (int i = 0; i < STACK; i++) stk[i] <= '0;
    end else begin
      upc <= next_addr;
      if (cc_latch) begin
        c_q <= carry;
        z_q <= zero;
        s_q <= sign;
      end
      unique case (seq_op)
        SEQ_CALL: begin
          stk[sp] <= inc;
          sp      <= sp + 1'b1;
        end
        SEQ_RET:   sp  <= sp - 1'b1;
        SEQ_LDCNT: cnt <= lit;
        SEQ_LOOP:  cnt <= cnt - 1'b1;
        default: ;
      endcase
    end
  end
endmodule
