// tb_tra: plays 256 patterns into the analyzer the way the UART delivers them
// (transmitter frames bit by bit on tx_serial followed by tx_done, receiver bytes
// with rx_done), then compares. Runs a fault-free test (result 00, both
// signatures equal to the reference), a corrupted transmitter bit (01), a
// corrupted received byte (10) and a wrong golden signature (11).
module tb_tra;
  import uart_bist_pkg::*;
  import uart_bist_tb_pkg::*;

  logic clk = 0, clr = 1, bit_tick = 1, tx_serial = 1, tx_done = 0, rx_done = 0, cmp = 0;
  logic [7:0] rx_data = 0, golden = 0, sig_tx, sig_rx;
  test_result_e test_result;
  logic result_valid;
  int checks = 0, failures = 0;

  tra dut (.clk, .clr, .bit_tick, .tx_serial, .tx_done, .rx_data, .rx_done, .cmp, .golden,
           .sig_tx, .sig_rx, .test_result, .result_valid);

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

  // One test of 256 patterns. bad_tx / bad_rx: pattern index whose transmitter
  // data bit 3 / received byte bit 6 is flipped (-1: none).
  task automatic run_test(input int bad_tx, input int bad_rx, input logic [7:0] gold,
                          input logic [1:0] exp);
    logic [7:0] p, ptx, prx, mtx, mrx;
    logic [9:0] f;
    clr = 1; @(posedge clk); #1; clr = 0;
    check(!result_valid, "cleared");
    p = 8'h01; mtx = 0; mrx = 0;
    golden = gold;
    for (int k = 0; k < 256; k++) begin
      p = lfsr_next(p);
      ptx = (k == bad_tx) ? p ^ 8'h08 : p;
      prx = (k == bad_rx) ? p ^ 8'h40 : p;
      mtx = misr_next(mtx, ptx);
      mrx = misr_next(mrx, prx);
      f = {1'b1, ptx, 1'b0};
      for (int b = 0; b < 10; b++) begin
        tx_serial = f[b];
        @(posedge clk); #1;
      end
      tx_serial = 1;
      tx_done = 1; rx_data = prx; rx_done = 1;
      @(posedge clk); #1;
      tx_done = 0; rx_done = 0;
      repeat ($urandom_range(0, 3)) @(posedge clk); #1;
    end
    check(sig_tx == mtx, $sformatf("sig_tx %h exp %h", sig_tx, mtx));
    check(sig_rx == mrx, $sformatf("sig_rx %h exp %h", sig_rx, mrx));
    cmp = 1; @(posedge clk); #1; cmp = 0;
    check(result_valid && test_result == exp,
          $sformatf("result %b exp %b", test_result, exp));
  endtask

  initial begin
    logic [7:0] g;
    g = golden_signature(256);
    repeat (2) @(posedge clk); #1;
    run_test(-1, -1, g, 2'b00);
    check(sig_tx == g && sig_rx == g, "fault-free signatures equal the reference");
    run_test(17, -1, g, 2'b01);
    run_test(-1, 200, g, 2'b10);
    run_test(-1, -1, g ^ 8'h01, 2'b11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
