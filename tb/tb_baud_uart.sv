// tb_baud_uart: with CLK_HZ = 1000 and BAUD = 100 the tick must come every 10
// cycles, one cycle wide, the first one 10 cycles after reset.
module tb_baud_uart;
  logic clk = 0, rst = 1;
  logic baud_tick;
  int checks = 0, failures = 0;

  baud_uart #(.CLK_HZ(1000), .BAUD(100)) dut (.clk, .rst, .baud_tick);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last, cyc, nticks;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    last = 0; cyc = 0; nticks = 0;
    for (int n = 0; n < 500; n++) begin
      @(posedge clk); #1; cyc++;
      if (baud_tick) begin
        check(cyc - last == 10, $sformatf("tick spacing %0d", cyc - last));
        last = cyc; nticks++;
      end
    end
    check(nticks == 50, $sformatf("%0d ticks in 500 cycles", nticks));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
