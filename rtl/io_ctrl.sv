// io_ctrl: SCAMP I/O controller for memory-mapped I/O.
//
// A bus address register (BAR) and a bus data register (BDR) are loaded from
// the D-bus, with its check symbol, so that I/O transfers stay in the data
// path code. The BAR drives the I/O address bus. The R/W bit is set when the
// BAR is loaded (io_op selects a read or a write). MSYNC is a flag the
// microprogram raises and drops. During a write (MSYNC high, R/W = write) the
// BDR drives the I/O data bus; otherwise the device drives it, and the D-bus
// multiplexer in scamp_top can take it. The device answers with SSYNC, which
// the sequencer tests as a branch condition; the wait is bounded by the
// sequencer's loop counter, not here.
//
// The registers and signals are the document's; the document leaves the bus
// protocol to the microprogram. The single-bit R/W encoding (1 = read), the
// data bus enable rule and the reset values (all zero, MSYNC low, read) are
// this design's choices. The handshake rule that R/W is not changed while
// MSYNC is high is checked by an assertion.
module io_ctrl
  import scamp_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  io_op_e io_op,
  input  cword_t dbus,          // D-bus word with its check symbol
  output cword_t io_addr,       // BAR
  output cword_t io_data_out,   // BDR
  output logic   io_data_oe,    // BDR drives the I/O data bus
  output logic   io_rw,         // 1: read, 0: write
  output logic   io_msync
);
  cword_t bar, bdr;
  logic   rw, msync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bar   <= '0;
      bdr   <= '0;
      rw    <= 1'b1;
      msync <= 1'b0;
    end else begin
      unique case (io_op)
        IO_BAR_READ:  begin bar <= dbus; rw <= 1'b1; end
        IO_BAR_WRITE: begin bar <= dbus; rw <= 1'b0; end
        IO_BDR:       bdr <= dbus;
        IO_MSYNC_ON:  msync <= 1'b1;
        IO_MSYNC_OFF: msync <= 1'b0;
        default: ;
      endcase
    end
  end

  assign io_addr     = bar;
  assign io_data_out = bdr;
  assign io_rw       = rw;
  assign io_msync    = msync;
  assign io_data_oe  = msync && !rw;

  // R/W and the address must not change during a transfer.
  a_no_bar_during_msync: assert property (@(posedge clk) disable iff (!rst_n)
    msync |-> !(io_op inside {IO_BAR_READ, IO_BAR_WRITE}));
endmodule
