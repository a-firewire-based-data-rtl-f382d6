// tb_singles_scaler - counts random trigger trains over short intervals and
// checks the published rate equals triggers/256, saturated at 255, that it
// changes exactly one cycle after an interval ends and holds through the
// whole next interval, that nothing is counted while the run is off, and
// that a stop keeps the last rate and a restart begins a fresh interval.
module tb_singles_scaler;
  localparam int INTERVAL = 70000;
  logic clk = 0, rst_n = 0, run = 0, trig = 0;
  logic [7:0] rate;
  int checks = 0, failures = 0, prev_r;

  singles_scaler #(.INTERVAL(INTERVAL), .CNT_W(24)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // triggers while not running are ignored
    repeat (1000) begin @(negedge clk); trig = 1; end
    @(negedge clk); trig = 0;
    check(rate == 0, "no rate while stopped");
    run = 1;
    prev_r = 0;
    for (int iv = 0; iv < 9; iv++) begin
      int n, expect_r, pct;
      n = 0;
      pct = (iv == 7) ? 100 : $urandom_range(1, 60);
      if (iv == 8) begin
        // stop part-way through: the count and timer are discarded
        for (int c = 0; c < INTERVAL / 3; c++) begin
          trig = 1; @(negedge clk);
        end
        trig = 0; run = 0;
        repeat (500) begin
          @(negedge clk); trig = 1;
          check(rate == 8'(prev_r), "rate held while stopped");
        end
        trig = 0;
        @(negedge clk) run = 1;
      end
      for (int c = 0; c < INTERVAL; c++) begin
        check(rate == 8'(prev_r), $sformatf("interval %0d cycle %0d: rate %0d held at %0d", iv, c, rate, prev_r));
        trig = ($urandom_range(0, 99) < pct);
        if (trig) n++;
        @(negedge clk);
      end
      trig = 0;
      expect_r = (n / 256 > 255) ? 255 : n / 256;
      check(rate == 8'(expect_r), $sformatf("interval %0d: rate %0d expected %0d (n=%0d)", iv, rate, expect_r, n));
      prev_r = expect_r;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
