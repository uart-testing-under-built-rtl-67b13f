// tb_lfsr: checks the LFSR step by step against the reference recurrence, its
// maximal period of 255, that it holds while trg is low, and trg_out timing.
module tb_lfsr;
  import uart_bist_tb_pkg::*;

  logic clk = 0, rst = 1, trg = 0;
  logic [7:0] q;
  logic trg_out;
  int checks = 0, failures = 0;

  lfsr dut (.clk, .rst, .trg, .q, .trg_out);

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
    bit seen [256];
    int period;
    repeat (3) @(posedge clk);
    #1 check(q == 8'h01 && trg_out == 0, "reset state");
    rst = 0;
    model = 8'h01;
    seen[model] = 1;
    period = 0;
    // Step continuously, as with trg held high.
    trg = 1;
    for (int k = 1; k <= 300; k++) begin
      @(posedge clk); #1;
      model = lfsr_next(model);
      check(q == model, $sformatf("step %0d q=%h exp=%h", k, q, model));
      check(trg_out == 1, "trg_out follows trg");
      if (period == 0 && model == 8'h01) period = k;
      if (k < 255) begin
        check(!seen[model], $sformatf("state %h repeats early", model));
        seen[model] = 1;
      end
    end
    check(period == 255, $sformatf("period %0d", period));
    // Hold while trg is low.
    trg = 0;
    @(posedge clk); #1;
    check(q == model, "no step once trg is low");
    check(trg_out == 0, "trg_out low one cycle after trg");
    repeat (5) begin
      @(posedge clk); #1;
      check(q == model, "holds when trg low");
    end
    // Single-cycle trg gives exactly one step.
    trg = 1; @(posedge clk); #1; trg = 0;
    model = lfsr_next(model);
    check(q == model && trg_out == 1, "single step");
    @(posedge clk); #1;
    check(q == model && trg_out == 0, "single step holds");
    // Reset returns to the seed.
    rst = 1; @(posedge clk); #1; rst = 0;
    check(q == 8'h01 && trg_out == 0, "reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
