// tb_bist_uart_top: end-to-end test of the BIST-enabled UART at its default
// parameters (50 MHz clock, 9600 baud, 256 patterns).
//  1. Self-test with the correct golden signature, computed here from the
//     reference LFSR and MISR models: result 00, both signatures equal the
//     reference, 256 frames through each path, duration within 16 cycles per pattern.
//  2. Test_En dropped and raised again with a wrong golden signature: result 11.
//  3. Normal mode with Tx_out looped back to Rx_in: the bytes 10110101 and
//     11110101 and a few random ones come back unchanged, one frame per
//     10 bit periods of 5208 cycles; a byte offered while the transmitter buffer
//     is busy waits (Tx_rdy low).
//  4. Normal mode without read requests: the first byte is held (Rx_full), the
//     second is discarded (Rx_discard), a later read returns the first.
// Every mechanism is counted and must have happened at least once.
module tb_bist_uart_top;
  import uart_bist_pkg::*;
  import uart_bist_tb_pkg::*;

  localparam int BIT_CYC = 50_000_000 / 9600;

  logic clk = 0, rst = 1, Test_En = 0, Tx_en = 0, Rx_rd = 1, loop_en = 1;
  logic [7:0] TxData_in = 0, Golden_sign = 0;
  logic Tx_out, Tx_done, Rx_done, Test_done, Tx_rdy, Rx_full, Rx_discard;
  logic [7:0] Rx_Data_out, Sign_tx, Sign_rx;
  test_result_e Test_result;
  logic Rx_in;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_test_pass = 0, n_test_fail = 0, n_mode_switch = 0, n_test_frames_tx = 0,
      n_test_frames_rx = 0, n_normal_rx = 0, n_discard = 0, n_tx_wait = 0;

  assign Rx_in = loop_en ? Tx_out : 1'b1;

  bist_uart_top dut (
    .clk, .rst, .Test_En, .TxData_in, .Tx_en, .Rx_in, .Rx_rd, .Golden_sign,
    .Tx_out, .Tx_done, .Rx_Data_out, .Rx_done, .Test_result, .Test_done,
    .Tx_rdy, .Rx_full, .Rx_discard, .Sign_tx, .Sign_rx);

  always #10 clk = ~clk;   // 50 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (1_500_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic test_en_q = 0;
  always @(negedge clk) if (!rst) begin
    if (Test_En != test_en_q) n_mode_switch++;
    test_en_q <= Test_En;
    if (Test_En && Tx_done) n_test_frames_tx++;
    if (Test_En && Rx_done) n_test_frames_rx++;
    if (!Test_En && Rx_done) n_normal_rx++;
    if (Rx_discard) n_discard++;
  end

  task automatic self_test(input logic [7:0] gold, input test_result_e exp);
    int c;
    @(negedge clk);
    Golden_sign = gold;
    Test_En = 1;
    c = 0;
    n_test_frames_tx = 0; n_test_frames_rx = 0;
    while (!Test_done && c < 100_000) begin @(negedge clk); c++; end
    check(Test_done, "test finished");
    check(c <= 256 * 16 + 8, $sformatf("test took %0d cycles", c));
    $display("self-test: %0d cycles, result %b", c, Test_result);
    check(Test_result == exp, $sformatf("Test_result %b exp %b", Test_result, exp));
    check(n_test_frames_tx == 256 && n_test_frames_rx == 256,
          $sformatf("frames tx %0d rx %0d", n_test_frames_tx, n_test_frames_rx));
    if (Test_result == RES_PASS) n_test_pass++; else n_test_fail++;
    repeat (10) @(negedge clk);
    check(Test_done && Test_result == exp, "result holds");
    Test_En = 0;
    @(negedge clk);
    check(!Test_done, "Test_done clears in normal mode");
  endtask

  // Normal mode: send one byte through the loop-back.
  task automatic send_byte(input logic [7:0] d);
    while (!Tx_rdy) begin @(negedge clk); n_tx_wait++; end
    TxData_in = d; Tx_en = 1;
    @(negedge clk); Tx_en = 0;
  endtask

  task automatic expect_rx(input logic [7:0] d);
    int c;
    c = 0;
    @(negedge clk);
    while (!Rx_done && c < 20 * BIT_CYC) begin @(negedge clk); c++; end
    check(Rx_done && Rx_Data_out == d, $sformatf("received %b exp %b", Rx_Data_out, d));
  endtask

  initial begin
    logic [7:0] g, r;
    int c;
    g = golden_signature(256);
    repeat (5) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);

    // 1. fault-free self-test
    self_test(g, RES_PASS);
    check(Sign_tx == g && Sign_rx == g, $sformatf("signatures %h %h exp %h", Sign_tx, Sign_rx, g));

    // 2. wrong golden signature
    self_test(g ^ 8'h80, RES_BOTH_FAULT);

    // 3. normal mode loop-back, timed frame
    repeat (3 * BIT_CYC) @(negedge clk);
    send_byte(8'b1011_0101);
    c = 0;
    while (!Tx_done) begin @(negedge clk); c++; end
    check(c >= 10 * BIT_CYC - 2 && c <= 11 * BIT_CYC + 2, $sformatf("frame took %0d cycles", c));
    expect_rx(8'b1011_0101);
    send_byte(8'b1111_0101);
    send_byte(8'h3C);                       // waits for the transmitter buffer
    expect_rx(8'b1111_0101);
    expect_rx(8'h3C);
    for (int k = 0; k < 3; k++) begin
      r = 8'($urandom);
      send_byte(r);
      expect_rx(r);
    end

    // 4. no read requests: hold, then discard
    Rx_rd = 0;
    send_byte(8'hA5);
    while (!Tx_done) @(negedge clk);
    repeat (2 * BIT_CYC) @(negedge clk);
    check(Rx_full, "first byte held");
    send_byte(8'h5A);
    while (!Tx_done) @(negedge clk);
    repeat (2 * BIT_CYC) @(negedge clk);
    check(n_discard == 1, "second byte discarded");
    Rx_rd = 1;
    expect_rx(8'hA5);

    // every mechanism must have happened
    check(n_test_pass > 0, "mechanism: self-test pass");
    check(n_test_fail > 0, "mechanism: self-test fail");
    check(n_mode_switch >= 4, "mechanism: mode switch");
    check(n_normal_rx >= 6, "mechanism: normal-mode receive");
    check(n_discard > 0, "mechanism: receive discard when full");
    check(n_tx_wait > 0, "mechanism: transmit buffer back-pressure");
    $display("mechanisms: pass %0d fail %0d switch %0d normal_rx %0d discard %0d tx_wait %0d",
             n_test_pass, n_test_fail, n_mode_switch, n_normal_rx, n_discard, n_tx_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
