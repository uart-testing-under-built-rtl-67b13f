// tb_tpg: with the bit tick on every cycle (test mode), each trg pulse must give
// the next LFSR pattern on the parallel output one cycle later, flagged by
// pattern_valid, and the same byte as a start/data/stop frame on rx_serial.
module tb_tpg;
  import uart_bist_tb_pkg::*;

  logic clk = 0, rst = 1, trg = 0, bit_tick = 1;
  logic [7:0] pattern;
  logic pattern_valid, rx_serial;
  int checks = 0, failures = 0;

  tpg dut (.clk, .rst, .trg, .bit_tick, .pattern, .pattern_valid, .rx_serial);

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
    logic [7:0] model;
    logic [9:0] f;
    repeat (3) @(posedge clk);
    #1 check(rx_serial == 1 && !pattern_valid, "idle after reset");
    rst = 0;
    model = 8'h01;
    repeat (3) @(posedge clk); #1;
    for (int n = 0; n < 40; n++) begin
      trg = 1; @(posedge clk); #1; trg = 0;
      model = lfsr_next(model);
      check(pattern_valid && pattern == model, $sformatf("pattern %h exp %h", pattern, model));
      @(posedge clk); #1;               // PISO loaded on this edge
      check(!pattern_valid, "pattern_valid one cycle");
      f = {1'b1, model, 1'b0};
      for (int b = 0; b < 10; b++) begin
        check(rx_serial == f[b], $sformatf("pattern %0d serial bit %0d", n, b));
        check(pattern == model, "pattern holds");
        @(posedge clk); #1;
      end
      repeat (2) begin
        check(rx_serial == 1, "idle after frame");
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
