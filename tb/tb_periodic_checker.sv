// tb_periodic_checker: with a reference clock 8 times faster than the
// monitored clock, a steady monitored clock gives no error; a stopped clock
// and a clock running too fast are flagged, and the error stays set.
module tb_periodic_checker;
  logic ref_clk = 0, rst_n = 0, mon = 0;
  logic [1:0] z;
  logic err;
  int checks = 0, failures = 0;
  int half = 8;       // monitored half period in reference half periods
  bit run = 1;

  periodic_checker #(.MIN_GAP(4), .MAX_GAP(16)) dut (.ref_clk, .rst_n, .mon_clk(mon), .z, .err);

  always #1 ref_clk = ~ref_clk;
  always begin
    #(half);
    if (run) mon = ~mon;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("fail: %s (z=%b)", what, z); end
  endtask

  initial begin
    #10 rst_n = 1;
    repeat (20) begin #50; chk(!err && z == 2'b10, "steady clock"); end
    run = 0;                 // clock stops
    #100;
    chk(err && z == 2'b00, "stopped clock");
    run = 1;
    #200;
    chk(err, "error is sticky");
    rst_n = 0; #4 rst_n = 1;
    repeat (10) begin #50; chk(!err, "after reset"); end
    half = 3;                // too fast: period of 3 reference cycles
    #100;
    chk(err, "fast clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
