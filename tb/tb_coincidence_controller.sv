// tb_coincidence_controller - the coincidence board FPGA as a whole, driven
// through its processor registers: the sync clock has period 8, a start
// written to the control register takes effect on the next sync clock
// rising edge, the time stamp counts master cycles from there, opposite-fan
// trigger pairs within the window are accepted and others not, the window
// and the angular separation change when their registers are written, and
// status records (pending flag, position, gates, time stamp) are read back
// byte by byte, every STATUS_PERIOD cycles and after a period change.
module tb_coincidence_controller;
  localparam int N = 36, SP = 200;
  logic clk = 0, rst_n = 0;
  logic [4:0] cpu_addr = 0;
  logic cpu_wr = 0;
  logic [7:0] cpu_wdata = 0, cpu_rdata;
  logic sync_clk, running, coinc, status_valid;
  logic [31:0] timestamp, status_ts;
  logic [N-1:0] trig = '0, accept;
  logic [15:0] gantry_pos = 16'h1234, status_pos;
  logic [3:0] gate = 4'b1010, status_gate;
  int checks = 0, failures = 0;
  int cyc = 0, last_rise = -1, nstat = 0, last_stat = -1, stat_gap = 0;
  logic sync_prev = 0;

  coincidence_controller #(.N_NODES(N), .STATUS_PERIOD(SP)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  task automatic cpu_write(logic [4:0] a, logic [7:0] d);
    @(negedge clk) begin cpu_addr = a; cpu_wdata = d; cpu_wr = 1; end
    @(negedge clk) cpu_wr = 0;
  endtask

  task automatic cpu_read(logic [4:0] a, output logic [7:0] d);
    @(negedge clk) cpu_addr = a;
    #1 d = cpu_rdata;
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    sync_prev <= sync_clk;
    if (sync_clk && !sync_prev) begin
      if (last_rise >= 0) check(cyc - last_rise == 8, "sync clock period 8");
      last_rise <= cyc;
    end
    if (status_valid) begin
      nstat++;
      if (last_stat >= 0) stat_gap = cyc - last_stat;
      last_stat = cyc;
    end
  end

  task automatic pair(int a, int b, int gap, bit expect_acc);
    @(negedge clk) trig = '0; trig[a] = 1;
    if (gap == 0) trig[b] = 1;
    else begin
      repeat (gap) begin @(negedge clk); trig = '0; end
      trig[b] = 1;
    end
    @(negedge clk) trig = '0;
    check(accept[a] == expect_acc && accept[b] == expect_acc, $sformatf("pair %0d,%0d gap %0d", a, b, gap));
    repeat (8) @(negedge clk);
  endtask

  initial begin
    logic [7:0] d;
    logic [31:0] ts;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cpu_read(5'h02, d); check(d == 2, "window reset value");
    cpu_read(5'h03, d); check(d == 6, "separation reset value");
    cpu_read(5'h04, d); check(d == 8'(SP), "period reset value");
    repeat (13) @(negedge clk);
    cpu_write(5'h00, 8'h01);
    cpu_read(5'h01, d); check(d[1] || d[0], "armed after start");
    while (!running) @(negedge clk);
    check(sync_clk && cyc - last_rise <= 1, "start aligned to sync edge");
    check(timestamp == 0, "time stamp starts at 0");
    repeat (37) @(negedge clk);
    check(timestamp == 37, "time stamp counts master cycles");
    pair(0, 18, 0, 1);
    pair(3, 22, 2, 1);
    pair(5, 24, 3, 0);
    pair(0, 2, 1, 0);
    pair(34, 16, 1, 1);
    // run-time change of the coincidence window and the angular acceptance
    cpu_write(5'h02, 8'd3);
    pair(5, 24, 3, 1);
    pair(5, 24, 4, 0);
    cpu_write(5'h03, 8'd9);
    pair(5, 24, 0, 0);     // cassettes 2 and 12: distance 8
    pair(0, 18, 0, 1);     // cassettes 0 and 9: distance 9
    cpu_write(5'h03, 8'd6);
    cpu_write(5'h02, 8'd2);
    // status record through the registers
    while (nstat < 1) @(negedge clk);
    cpu_read(5'h01, d); check(d[2], "record pending");
    cpu_read(5'h08, d); check(d == 8'h34, "record position low");
    cpu_read(5'h09, d); check(d == 8'h12, "record position high");
    cpu_read(5'h0A, d); check(d == 8'h0A, "record gates");
    for (int k = 0; k < 4; k++) begin cpu_read(5'(5'h0C + k), d); ts[8*k +: 8] = d; end
    check(ts == 32'(SP - 1), $sformatf("record time stamp %0d", ts));
    cpu_write(5'h00, 8'h04);
    cpu_read(5'h01, d); check(!d[2], "record pending cleared");
    while (nstat < 3) @(negedge clk);
    check(stat_gap == SP, "status period");
    cpu_write(5'h04, 8'd50); cpu_write(5'h05, 8'd0); cpu_write(5'h06, 8'd0);
    begin int n0; n0 = nstat; while (nstat < n0 + 3) @(negedge clk); end
    check(stat_gap == 50, $sformatf("status period after change %0d", stat_gap));
    cpu_write(5'h00, 8'h02);
    @(negedge clk);
    check(!running, "stopped");
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
