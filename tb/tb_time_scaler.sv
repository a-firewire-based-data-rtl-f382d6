// tb_time_scaler - start must wait for the next sync clock rising edge.
// The testbench drives its own divide-by-8 sync clock, issues start at
// random phases, and checks that counting begins exactly at the edge after
// start (count 0 there, +1 per cycle after), that it never starts without
// an edge, and that stop halts the count.
module tb_time_scaler;
  logic clk = 0, rst_n = 0, start = 0, stop = 0, sync_clk = 0;
  logic armed, running;
  logic [31:0] count;
  int checks = 0, failures = 0;
  int cyc = 0;

  time_scaler #(.TS_W(32)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    sync_clk <= ((cyc + 1) % 8) < 4;   // rises in cycles that are multiples of 8
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 20; run++) begin
      int wait_c, edge_c, hold_c;
      logic [31:0] frozen;
      repeat ($urandom_range(1, 11)) @(posedge clk);
      #1 start = 1;
      @(posedge clk); #1 start = 0;
      check(armed && !running, "armed after start");
      // cycles until the sync clock is high with a low previous value
      wait_c = 0;
      while (!(sync_clk && !dut.sync_q)) begin
        check(!running, "runs before sync edge");
        @(posedge clk); #1; wait_c++;
      end
      check(wait_c <= 8, "sync edge within 8 cycles");
      @(posedge clk); #1;
      check(running && count == 0, "count cleared at sync edge");
      edge_c = $urandom_range(5, 60);
      repeat (edge_c) @(posedge clk);
      #1 check(count == 32'(edge_c), $sformatf("count %0d expected %0d", count, edge_c));
      stop = 1;
      @(posedge clk); #1 stop = 0;
      frozen = count;
      check(!running && !armed, "stopped");
      hold_c = $urandom_range(3, 20);
      repeat (hold_c) @(posedge clk);
      #1 check(count == frozen, "count frozen after stop");
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
