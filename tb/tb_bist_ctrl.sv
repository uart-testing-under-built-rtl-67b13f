// tb_bist_ctrl: a stand-in UART answers every trg with tx_done and rx_done after
// random delays. Checks one clr at the start, exactly 256 trg pulses, never a
// new trg before both answers, one cmp after the last pattern, test_done until
// test_en falls, the timeout when the receiver never answers, and restart.
module tb_bist_ctrl;
  logic clk = 0, rst = 1, test_en = 0, tx_done = 0, rx_done = 0;
  logic clr, trg, cmp, busy, test_done;
  logic [15:0] timeouts;
  int checks = 0, failures = 0;
  int ntrg = 0, nclr = 0, ncmp = 0, ntx = 0, nrx = 0;
  bit rx_dead = 0;

  bist_ctrl dut (.clk, .rst, .test_en, .tx_done, .rx_done, .clr, .trg, .cmp, .busy,
                 .test_done, .timeouts);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stand-in UART.
  always @(negedge clk) if (!rst) begin
    if (clr) nclr++;
    if (cmp) ncmp++;
    if (trg) begin
      check(ntx == ntrg && (rx_dead || nrx == ntrg), "trg while a pattern is still in flight");
      ntrg++;
      fork
        begin
          repeat ($urandom_range(3, 20)) @(negedge clk);
          tx_done = 1; ntx++; @(negedge clk); tx_done = 0;
        end
        begin
          if (!rx_dead) begin
            repeat ($urandom_range(3, 20)) @(negedge clk);
            rx_done = 1; nrx++; @(negedge clk); rx_done = 0;
          end
        end
      join_none
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (3) @(posedge clk); #1;
    check(!busy && !test_done && ntrg == 0, "idle without test_en");
    test_en = 1;
    wait (test_done); #1;
    check(nclr == 1, $sformatf("%0d clr pulses", nclr));
    check(ntrg == 256, $sformatf("%0d trg pulses", ntrg));
    check(ncmp == 1, $sformatf("%0d cmp pulses", ncmp));
    check(timeouts == 0, "no timeout in a healthy run");
    repeat (20) @(posedge clk); #1;
    check(test_done && !busy && ntrg == 256, "stays done");
    test_en = 0;
    @(posedge clk); #1;
    check(!test_done, "test_en low ends the test");
    // Receiver dead: every pattern times out, the test still ends.
    rx_dead = 1; ntrg = 0; nclr = 0; ncmp = 0; ntx = 0; nrx = 0;
    @(negedge clk); test_en = 1;
    wait (test_done); #1;
    check(ntrg == 256 && ncmp == 1, "completes with dead receiver");
    check(timeouts == 256, $sformatf("%0d timeouts", timeouts));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
