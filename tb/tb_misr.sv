// tb_misr: compacts random bytes and compares the signature with the reference
// division step after every enabled edge; checks the enable, the clear, the
// 255-step period with zero input and linearity (superposition of two streams).
module tb_misr;
  import uart_bist_tb_pkg::*;

  logic clk = 0, clr = 1, en = 0;
  logic [7:0] d = 0, sig;
  int checks = 0, failures = 0;

  misr dut (.clk, .clr, .en, .d, .sig);

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

  task automatic run_stream(input logic [7:0] a [32], output logic [7:0] res);
    clr = 1; @(posedge clk); #1; clr = 0;
    for (int i = 0; i < 32; i++) begin
      en = 1; d = a[i]; @(posedge clk); #1;
    end
    en = 0; res = sig;
  endtask

  initial begin
    logic [7:0] model;
    logic [7:0] a [32], b [32], c [32];
    logic [7:0] ra, rb, rc;
    int period;
    @(posedge clk); #1;
    check(sig == 0, "clear");
    clr = 0; model = 0;
    for (int n = 0; n < 300; n++) begin
      en = ($urandom_range(0, 3) != 0);
      d  = 8'($urandom);
      @(posedge clk); #1;
      if (en) model = misr_next(model, d);
      check(sig == model, $sformatf("cycle %0d sig=%h exp=%h", n, sig, model));
    end
    // Period with zero input from a non-zero state.
    clr = 1; @(posedge clk); #1; clr = 0;
    en = 1; d = 8'h01; @(posedge clk); #1; d = 8'h00;
    period = 0;
    for (int k = 1; k <= 260; k++) begin
      @(posedge clk); #1;
      if (period == 0 && sig == 8'h01) period = k;
    end
    check(period == 255, $sformatf("period %0d", period));
    en = 0;
    // Superposition: sig(a) ^ sig(b) == sig(a ^ b) from a zero start.
    for (int i = 0; i < 32; i++) begin
      a[i] = 8'($urandom); b[i] = 8'($urandom); c[i] = a[i] ^ b[i];
    end
    run_stream(a, ra); run_stream(b, rb); run_stream(c, rc);
    check((ra ^ rb) == rc, "superposition");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
