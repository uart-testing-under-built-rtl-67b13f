// tb_rx_top: frames are driven on rx_in in step with a bit tick every 3rd cycle.
// Checks the received bytes, the one-cycle rx_done, the four read/full cases of
// the receiver control logic (a frame that arrives while the buffer is full and
// unread is discarded), RxFULL/RxRDY and the stop-bit check.
module tb_rx_top;
  logic clk = 0, rst = 1, bit_tick = 0, rx_in = 1, wen = 0;
  logic [7:0] rx_out;
  logic rx_done, rx_rdy, rx_full, rx_discard, rx_frame_err;
  int checks = 0, failures = 0;
  int ndone = 0, ndiscard = 0, nferr = 0;

  rx_top dut (.clk, .rst, .bit_tick, .rx_in, .wen, .rx_out, .rx_done, .rx_rdy, .rx_full,
              .rx_discard, .rx_frame_err);

  always #5 clk = ~clk;

  int tcnt = 0;
  always @(posedge clk) begin
    tcnt <= (tcnt == 2) ? 0 : tcnt + 1;
    bit_tick <= (tcnt == 2);
  end

  always @(negedge clk) begin
    if (rx_done) ndone++;
    if (rx_discard) ndiscard++;
    if (rx_frame_err) nferr++;
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

  // Drive one frame; the line changes right after a tick edge.
  task automatic send(input logic [7:0] d, input logic stop = 1);
    logic [9:0] f;
    f = {stop, d, 1'b0};
    for (int b = 0; b < 10; b++) begin
      do @(posedge clk); while (!bit_tick);
      #1 rx_in = f[b];
    end
    do @(posedge clk); while (!bit_tick);
    #1 rx_in = 1;
    repeat (2) do @(posedge clk); while (!bit_tick);   // let the receiver finish
    #1;
  endtask

  initial begin
    logic [7:0] d, d2;
    int n0;
    repeat (3) @(posedge clk);
    #1 check(!rx_full && rx_rdy && !rx_done, "reset flags");
    rst = 0;
    repeat (10) @(posedge clk); #1;
    // Case "request and not full" / "request and full": reading enabled throughout.
    wen = 1;
    for (int n = 0; n < 30; n++) begin
      d = 8'($urandom);
      n0 = ndone;
      send(d);
      check(ndone == n0 + 1, "one rx_done per frame");
      check(rx_out == d, $sformatf("rx_out %h exp %h", rx_out, d));
      check(!rx_full, "buffer emptied by read");
    end
    // Case "no request, not full": frame taken into the buffer, nothing handed over.
    wen = 0;
    d = 8'h5A; n0 = ndone;
    send(d);
    check(rx_full && !rx_rdy && ndone == n0, "buffered, not delivered");
    // Case "no request, full": the next frame is discarded.
    d2 = 8'hC3;
    send(d2);
    check(ndiscard == 1, "frame discarded while full");
    check(rx_full, "still full");
    // Now the peripheral asks: the buffered (first) byte comes out.
    @(negedge clk); wen = 1;
    @(posedge clk); #1;
    check(rx_done && rx_out == 8'h5A, "held byte delivered");
    @(posedge clk); #1;
    check(!rx_done && !rx_full && rx_rdy, "buffer empty again");
    // Bad stop bit: frame dropped, error flagged.
    n0 = ndone;
    send(8'h99, 1'b0);
    repeat (12) do @(posedge clk); while (!bit_tick);  // line back to idle
    #1;
    check(nferr == 1 && ndone == n0, "framing error drops frame");
    // Receiver recovers.
    send(8'h3C);
    check(rx_out == 8'h3C, "recovers after framing error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
