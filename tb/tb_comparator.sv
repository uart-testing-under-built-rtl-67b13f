// tb_comparator: drives random and equal signatures and checks the 2-bit result
// code, the valid flag, that the result holds without cmp and that clr clears it.
module tb_comparator;
  import uart_bist_pkg::*;

  logic clk = 0, clr = 1, cmp = 0;
  logic [7:0] sig_tx = 0, sig_rx = 0, golden = 0;
  test_result_e result;
  logic valid;
  int checks = 0, failures = 0;
  int seen [4];

  comparator dut (.clk, .clr, .cmp, .sig_tx, .sig_rx, .golden, .result, .valid);

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
    logic [1:0] exp;
    @(posedge clk); #1;
    check(result == RES_PASS && !valid, "clear");
    clr = 0;
    for (int n = 0; n < 200; n++) begin
      golden = 8'($urandom);
      sig_tx = ($urandom_range(0, 1) == 0) ? golden : 8'($urandom);
      sig_rx = ($urandom_range(0, 1) == 0) ? golden : 8'($urandom);
      exp = 2'b00;
      if (sig_tx != golden) exp[0] = 1'b1;   // 01 = transmitter fault
      if (sig_rx != golden) exp[1] = 1'b1;   // 10 = receiver fault
      cmp = 1; @(posedge clk); #1; cmp = 0;
      check(result == exp && valid, $sformatf("result %b exp %b", result, exp));
      seen[exp]++;
      sig_tx = ~sig_tx; sig_rx = ~sig_rx;
      @(posedge clk); #1;
      check(result == exp, "holds without cmp");
    end
    for (int i = 0; i < 4; i++) check(seen[i] > 0, $sformatf("code %0d exercised", i));
    clr = 1; @(posedge clk); #1;
    check(!valid && result == RES_PASS, "clr");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
