// tb_io_ctrl: loads BAR for a read and for a write, loads BDR, raises and
// drops MSYNC, and checks the address bus, data bus, R/W and the data bus
// enable (only during a write transfer) after each step.
module tb_io_ctrl;
  import scamp_pkg::*;
  logic clk = 0, rst_n = 0;
  io_op_e io_op;
  cword_t dbus, io_addr, io_data_out;
  logic io_data_oe, io_rw, io_msync;
  int checks = 0, failures = 0;

  io_ctrl dut (.clk, .rst_n, .io_op, .dbus, .io_addr, .io_data_out, .io_data_oe, .io_rw, .io_msync);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input io_op_e op, input cword_t d);
    @(negedge clk);
    io_op = op; dbus = d;
    @(negedge clk);
    io_op = IO_NONE;
  endtask

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("fail: %s", what); end
  endtask

  initial begin
    io_op = IO_NONE; dbus = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 50; n++) begin
      cword_t a, d;
      a = cword_t'($urandom);
      d = cword_t'($urandom);
      step(IO_BAR_READ, a);
      chk(io_addr == a && io_rw && !io_msync && !io_data_oe, "bar read");
      step(IO_MSYNC_ON, '0);
      chk(io_msync && !io_data_oe && io_addr == a, "msync read");
      step(IO_MSYNC_OFF, '0);
      chk(!io_msync, "msync off");
      step(IO_BDR, d);
      chk(io_data_out == d && !io_data_oe, "bdr");
      step(IO_BAR_WRITE, a ^ 20'hFFFFF);
      chk(io_addr == (a ^ 20'hFFFFF) && !io_rw && !io_data_oe, "bar write");
      step(IO_MSYNC_ON, '0);
      chk(io_data_oe && io_data_out == d, "write drives data");
      step(IO_MSYNC_OFF, '0);
      chk(!io_data_oe, "write done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
