// tb_piso: loads random 10-bit words and checks that they leave bit 0 first, one
// bit per shift step, with ones behind them, and that shifting is gated.
module tb_piso;
  logic clk = 0, rst = 1, load = 0, shift = 0;
  logic [9:0] din;
  logic sout;
  int checks = 0, failures = 0;

  piso #(.WIDTH(10)) dut (.clk, .rst, .load, .din, .shift, .sout);

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
    logic [9:0] w;
    din = '0;
    repeat (2) @(posedge clk);
    #1 check(sout == 1, "idle after reset");
    rst = 0;
    for (int n = 0; n < 50; n++) begin
      w = 10'($urandom);
      din = w; load = 1; shift = 1;          // load wins over shift
      @(posedge clk); #1; load = 0;
      for (int b = 0; b < 10; b++) begin
        check(sout == w[b], $sformatf("word %0d bit %0d", n, b));
        // stall one cycle now and then
        if ($urandom_range(0, 3) == 0) begin
          shift = 0; @(posedge clk); #1;
          check(sout == w[b], "holds when shift low");
          shift = 1;
        end
        @(posedge clk); #1;
      end
      for (int b = 0; b < 3; b++) begin
        check(sout == 1, "ones after word");
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
