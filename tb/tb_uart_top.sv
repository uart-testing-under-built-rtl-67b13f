// tb_uart_top: UART core with CLK_HZ = 80 and BAUD = 10 (8 clocks per bit).
// Normal mode: the transmitter output is looped back to the receiver; random bytes
// must come back unchanged, a frame must take 10 bit periods (80 cycles) and the
// bit clock enable must tick every 8 cycles. Test mode: the bit clock enable is
// high every cycle and a frame takes 10 cycles.
module tb_uart_top;
  logic clk = 0, rst = 1, test_en = 0, oen = 0, wen = 1;
  logic [7:0] tx_in = 0, rx_out;
  logic tx_out, tx_done, tx_rdy, tx_empty, rx_done, rx_rdy, rx_full, rx_discard, rx_frame_err;
  logic bclk_en;
  int checks = 0, failures = 0;

  uart_top #(.CLK_HZ(80), .BAUD(10)) dut (
    .clk, .rst, .test_en, .tx_in, .oen, .tx_out, .tx_done, .tx_rdy, .tx_empty,
    .rx_in(tx_out), .wen, .rx_out, .rx_done, .rx_rdy, .rx_full, .rx_discard, .rx_frame_err,
    .bclk_en);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Send one byte, return cycles from the first tx_done-free cycle of the frame
  // (start bit on the line) to tx_done, and check the looped-back byte.
  task automatic loop_byte(input logic [7:0] d, input int frame_cycles);
    int c;
    @(negedge clk); tx_in = d; oen = 1;
    @(negedge clk); oen = 0;
    while (tx_out) @(negedge clk);          // start bit appears
    c = 0;
    while (!tx_done) begin @(negedge clk); c++; end
    check(c == frame_cycles, $sformatf("frame took %0d cycles, exp %0d", c, frame_cycles));
    c = 0;
    while (!rx_done && c < 100) begin @(negedge clk); c++; end
    check(rx_done && rx_out == d, $sformatf("looped back %h exp %h", rx_out, d));
    check(!rx_frame_err && !rx_discard, "no receive error");
  endtask

  initial begin
    int last, cyc, n;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // Bit clock enable spacing in normal mode.
    last = -1; n = 0;
    for (cyc = 0; cyc < 100; cyc++) begin
      @(negedge clk);
      if (bclk_en) begin
        if (last >= 0) check(cyc - last == 8, "baud tick spacing");
        last = cyc; n++;
      end
    end
    check(n >= 12, "baud ticks seen");
    for (int k = 0; k < 8; k++) loop_byte(8'($urandom), 80);
    loop_byte(8'b1011_0101, 80);
    // Test mode: one bit per clock.
    test_en = 1;
    @(negedge clk);
    check(bclk_en, "bit clock every cycle in test mode");
    for (int k = 0; k < 20; k++) loop_byte(8'($urandom), 10);
    loop_byte(8'b1111_0101, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
