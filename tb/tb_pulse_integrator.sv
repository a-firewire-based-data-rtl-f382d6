// tb_pulse_integrator - integrates random pulse trains of 16 samples and
// compares the 12-bit result (top bits of the 14-bit sum) and the latency
// (done exactly 16 cycles after start) with a reference sum.
module tb_pulse_integrator;
  localparam int N = 16;
  logic clk = 0, rst_n = 0, start = 0;
  logic [9:0] sample = '0;
  logic busy, done;
  logic [11:0] result;
  int checks = 0, failures = 0;

  pulse_integrator #(.ADC_W(10), .N_SAMPLES(N), .OUT_W(12)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int sum, lat, peak;
      sum = 0;
      peak = $urandom_range(0, 1023);
      @(negedge clk);
      start = 1;
      for (int k = 0; k < N; k++) begin
        sample = (t % 10 == 0) ? 10'd1023 : 10'($urandom_range(0, peak));
        sum += sample;
        @(negedge clk);
        start = 0;
        if (k < N - 1) check(!done, "done too early");
      end
      sample = 10'($urandom);
      lat = N;
      check(done, $sformatf("done after %0d cycles", lat));
      check(result == 12'(sum >> 2), $sformatf("result %0d expected %0d", result, sum >> 2));
      @(negedge clk);
      check(!done, "done is one cycle");
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
