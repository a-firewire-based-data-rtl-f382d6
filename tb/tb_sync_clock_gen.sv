// tb_sync_clock_gen - checks the sync clock divides the master clock by 8
// with a 50 % duty cycle: period and high time measured over many cycles.
module tb_sync_clock_gen;
  logic clk = 0, rst_n = 0, sync_clk;
  int checks = 0, failures = 0;
  int last_rise = -1, cyc = 0, high = 0, rises = 0;
  logic prev = 0;

  sync_clock_gen #(.DIV(8)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (sync_clk) high++;
    if (sync_clk && !prev) begin
      if (last_rise >= 0) begin
        checks++;
        if (cyc - last_rise != 8) begin failures++; $display("FAIL period %0d", cyc - last_rise); end
      end
      rises++;
      last_rise = cyc;
    end
    prev <= sync_clk;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (800) @(posedge clk);
    checks++;
    if (rises < 99) begin failures++; $display("FAIL only %0d rising edges", rises); end
    checks++;
    if (high < 396 || high > 404) begin failures++; $display("FAIL high cycles %0d of 800", high); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
