// tb_sipo: shifts random bits into a 4-bit SIPO and compares all outputs with a
// queue model after every edge; checks the shift enable and clear.
module tb_sipo;
  logic clk = 0, clr = 1, shift = 0, sin = 0;
  logic [3:0] q;
  logic [3:0] model;
  int checks = 0, failures = 0;

  sipo #(.WIDTH(4)) dut (.clk, .clr, .shift, .sin, .q);

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
    @(posedge clk); #1;
    check(q == 0, "clear");
    clr = 0; model = 0;
    for (int n = 0; n < 200; n++) begin
      shift = ($urandom_range(0, 4) != 0);
      sin   = 1'($urandom);
      @(posedge clk); #1;
      if (shift) model = {sin, model[3:1]};   // first stage is the MSB
      check(q == model, $sformatf("cycle %0d q=%b exp=%b", n, q, model));
    end
    clr = 1; shift = 1; sin = 1;
    @(posedge clk); #1;
    check(q == 0, "clear wins");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
