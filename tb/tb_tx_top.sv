// tb_tx_top: the bit tick comes every 4th cycle. Random bytes are offered with
// random gaps; a line monitor samples the serial output once per tick and checks
// start bit, 8 data bits LSB first and stop bit, that every bit lasts one tick
// period, that tx_done pulses once per frame on the tick ending the stop bit, that
// back-to-back bytes follow with no idle gap, and the TxRDY/TxE flags.
module tb_tx_top;
  logic clk = 0, rst = 1, bit_tick = 0, oen = 0;
  logic [7:0] tx_in = 0;
  logic tx_out, tx_done, tx_rdy, tx_empty;
  int checks = 0, failures = 0;
  logic [7:0] sent [$];
  int frames = 0, back_to_back = 0;

  tx_top dut (.clk, .rst, .bit_tick, .oen, .tx_in, .tx_out, .tx_done, .tx_rdy, .tx_empty);

  always #5 clk = ~clk;

  int tcnt = 0;
  always @(posedge clk) begin
    tcnt <= (tcnt == 3) ? 0 : tcnt + 1;
    bit_tick <= (tcnt == 3);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Line monitor, independent of the DUT: at the falling edge before each tick the
  // line shows the bit of the period that the tick ends.
  initial begin : monitor
    logic [7:0] d;
    logic idle_before;
    idle_before = 1;
    wait (!rst);
    forever begin
      @(negedge clk);
      if (bit_tick && tx_out == 0) begin
        if (!idle_before) back_to_back++;
        for (int b = 0; b < 8; b++) begin
          do @(negedge clk); while (!bit_tick);
          d[b] = tx_out;
          check(!tx_done, "no tx_done inside frame");
        end
        do @(negedge clk); while (!bit_tick);
        check(tx_out == 1, "stop bit");
        check(sent.size() > 0, "frame without byte");
        if (sent.size() > 0) begin
          logic [7:0] e;
          e = sent.pop_front();
          check(d == e, $sformatf("data %h exp %h", d, e));
        end
        @(negedge clk);
        check(tx_done == 1, "tx_done after the tick ending the stop bit");
        frames++;
        idle_before = 0;
      end else if (bit_tick) begin
        idle_before = 1;
      end
    end
  end

  // tx_done lasts one cycle.
  logic done_q = 0;
  always @(negedge clk) begin
    if (!rst && tx_done && done_q) check(0, "tx_done longer than one cycle");
    done_q <= tx_done;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 check(tx_out == 1 && tx_rdy && tx_empty, "reset flags");
    rst = 0;
    for (int n = 0; n < 40; n++) begin
      // wait until the TBR is free, then offer one byte
      while (!tx_rdy) begin @(posedge clk); #1; end
      tx_in = 8'($urandom);
      oen = 1;
      @(posedge clk); #1;
      sent.push_back(tx_in);
      oen = 0;
      check(!tx_rdy, "TBR full after load");
      if (n >= 20) repeat ($urandom_range(0, 60)) @(posedge clk);  // later bytes with gaps
      #1;
    end
    wait (sent.size() == 0);
    repeat (50) @(posedge clk); #1;
    check(tx_empty && tx_rdy && tx_out == 1, "idle at end");
    check(frames == 40, $sformatf("%0d frames", frames));
    check(back_to_back > 10, $sformatf("%0d back-to-back frames", back_to_back));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
