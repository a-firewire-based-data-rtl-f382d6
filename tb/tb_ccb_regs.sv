// tb_ccb_regs - register map of the coincidence controller: reset values,
// write/read-back of window, separation and the three period bytes, start
// and stop pulses only for the matching control bits, the sticky
// record-pending flag and its clear, and the record bytes, little-endian.
module tb_ccb_regs;
  logic clk = 0, rst_n = 0;
  logic [4:0] cpu_addr = 0;
  logic cpu_wr = 0;
  logic [7:0] cpu_wdata = 0, cpu_rdata;
  logic start, stop;
  logic [7:0] win_cyc, min_sep;
  logic [23:0] period;
  logic running = 0, armed = 0, rec_valid = 0;
  logic [15:0] rec_pos = 16'hBEEF;
  logic [3:0] rec_gate = 4'h9;
  logic [31:0] rec_ts = 32'h1234_5678;
  int checks = 0, failures = 0, n_start = 0, n_stop = 0;

  ccb_regs #(.WINDOW_CYC(2), .MIN_SEP(6), .STATUS_PERIOD(625000)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (start) n_start++;
    if (stop) n_stop++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(logic [4:0] a, logic [7:0] d);
    @(negedge clk) begin cpu_addr = a; cpu_wdata = d; cpu_wr = 1; end
    @(negedge clk) cpu_wr = 0;
  endtask

  task automatic rd(logic [4:0] a, output logic [7:0] d);
    cpu_addr = a;
    #1 d = cpu_rdata;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(win_cyc == 2 && min_sep == 6 && period == 625000, "reset values");
    begin logic [7:0] r0, r1, r2; rd(5'h04, r0); rd(5'h05, r1); rd(5'h06, r2); check(r0 == 8'h68 && r1 == 8'h89 && r2 == 8'h09, "period bytes 625000"); end
    for (int i = 0; i < 50; i++) begin
      logic [7:0] w, s;
      logic [23:0] p;
      w = 8'($urandom); s = 8'($urandom); p = 24'($urandom);
      wr(5'h02, w); wr(5'h03, s);
      wr(5'h04, p[7:0]); wr(5'h05, p[15:8]); wr(5'h06, p[23:16]);
      check(win_cyc == w && min_sep == s && period == p, "registers drive outputs");
      begin logic [7:0] r0, r1, r2; rd(5'h02, r0); rd(5'h03, r1); rd(5'h05, r2); check(r0 == w && r1 == s && r2 == p[15:8], "read back"); end
    end
    wr(5'h00, 8'h01); check(n_start == 1 && n_stop == 0, "start pulse");
    wr(5'h00, 8'h02); check(n_start == 1 && n_stop == 1, "stop pulse");
    wr(5'h01, 8'h03); check(n_start == 1 && n_stop == 1, "no pulse from other address");
    running = 1; armed = 0;
    @(negedge clk); begin logic [7:0] r0; rd(5'h01, r0); check(r0 == 8'h01, "running bit"); end
    running = 0; armed = 1;
    @(negedge clk); begin logic [7:0] r0; rd(5'h01, r0); check(r0 == 8'h02, "armed bit"); end
    armed = 0;
    @(negedge clk) rec_valid = 1;
    @(negedge clk) rec_valid = 0;
    repeat (5) @(negedge clk);
    begin logic [7:0] r0; rd(5'h01, r0); check(r0 == 8'h04, "record pending sticky"); end
    begin logic [7:0] r0, r1, r2; rd(5'h08, r0); rd(5'h09, r1); rd(5'h0A, r2); check(r0 == 8'hEF && r1 == 8'hBE && r2 == 8'h09, "record position and gates"); end
    begin logic [7:0] r0, r1, r2, r3; rd(5'h0C, r0); rd(5'h0D, r1); rd(5'h0E, r2); rd(5'h0F, r3); check(r0 == 8'h78 && r1 == 8'h56 && r2 == 8'h34 && r3 == 8'h12, "record time stamp"); end
    begin logic [7:0] r0; rd(5'h1F, r0); check(r0 == 8'h00, "unused address"); end
    wr(5'h00, 8'h04);
    begin logic [7:0] r0; rd(5'h01, r0); check(r0 == 8'h00, "pending cleared"); end
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
