// tb_node_regs - register map of a node FPGA: command pulses from the
// control register bits, status bits and FIFO level read back, and the
// saturating drop counter that a start clears.
module tb_node_regs;
  logic clk = 0, rst_n = 0;
  logic [4:0] cpu_addr = 0;
  logic cpu_wr = 0;
  logic [7:0] cpu_wdata = 0, cpu_rdata;
  logic start, stop, send_last;
  logic running = 0, armed = 0, last_ready = 0, fifo_full = 0, fifo_empty = 0, dropped = 0;
  logic [7:0] fifo_level = 0;
  int checks = 0, failures = 0, n_start = 0, n_stop = 0, n_send = 0;

  node_regs dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (start) n_start++;
    if (stop) n_stop++;
    if (send_last) n_send++;
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
    wr(5'h00, 8'h01); check(n_start == 1 && n_stop == 0 && n_send == 0, "start");
    wr(5'h00, 8'h02); check(n_start == 1 && n_stop == 1 && n_send == 0, "stop");
    wr(5'h00, 8'h04); check(n_start == 1 && n_stop == 1 && n_send == 1, "send last");
    wr(5'h02, 8'h07); check(n_start == 1 && n_stop == 1 && n_send == 1, "other address");
    for (int i = 0; i < 64; i++) begin
      logic [4:0] b;
      b = 5'(i);
      {fifo_empty, fifo_full, last_ready, armed, running} = b;
      fifo_level = 8'($urandom);
      @(negedge clk);
      begin logic [7:0] r0; rd(5'h01, r0); check(r0 == {3'b0, b}, "status bits"); end
      begin logic [7:0] r0; rd(5'h02, r0); check(r0 == fifo_level, "FIFO level"); end
    end
    for (int i = 0; i < 300; i++) begin
      @(negedge clk) dropped = 1;
    end
    @(negedge clk) dropped = 0;
    begin logic [7:0] r0; rd(5'h03, r0); check(r0 == 8'd255, "drop counter saturates"); end
    wr(5'h00, 8'h01);
    begin logic [7:0] r0; rd(5'h03, r0); check(r0 == 8'd0, "start clears drop counter"); end
    repeat (17) @(negedge clk) dropped = 1;
    @(negedge clk) dropped = 0;
    begin logic [7:0] r0; rd(5'h03, r0); check(r0 == 8'd17, "drop count"); end
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
