// tb_node_fpga - one node end to end: start on the sync clock, PMT triggers
// with TAC values and ADC pulses, a coincidence controller model that
// accepts some triggers and ignores others, a controller FIFO with random
// back-pressure and a processor model that answers last_ready after a
// random delay, all through the node's register bus (start, status read,
// send-last command). Every quadlet reaching the controller FIFO is compared with
// packets built here from the driven inputs (time stamp counted from the
// observed start, TAC MSBs, 16-sample sums, module ID, PMT id). Blocks are
// shortened to 10 events to run the hand-shake often.
module tb_node_fpga;
  import emices_pkg::*;
  localparam int BLOCK = 160, N = 16, TAC_W = 10;
  localparam logic [5:0] MID = 6'd21;
  logic clk = 0, rst_n = 0, sync_clk = 0;
  logic [4:0] cpu_addr = 0;
  logic cpu_wr = 0;
  logic [7:0] cpu_wdata = 0, cpu_rdata;
  logic [1:0] trig = 0;
  logic [TAC_W-1:0] tac [2];
  adc_t adc [2][4];
  logic event_trig, accept = 0, ti_wr, ti_full = 0, last_ready;
  logic [31:0] ti_data;
  logic running, block_done, ev_cleared, ev_dropped, ev_stored;
  int checks = 0, failures = 0;
  int cyc = 0, run_at = -1, blocks = 0, n_clr = 0, nq = 0;
  bit poll_en = 0;
  logic [31:0] expq[$];

  node_fpga #(.MODULE_ID(MID), .TAC_W(TAC_W), .N_SAMPLES(N), .BLOCK_BYTES(BLOCK)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    sync_clk <= ((cyc + 1) % 8) < 4;
    ti_full <= ($urandom_range(0, 4) == 0);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (ti_wr) begin
      check(expq.size() > 0 && ti_data == expq[0], "quadlet to controller FIFO");
      if (expq.size() > 0) void'(expq.pop_front());
      nq++;
    end
    if (block_done) blocks++;
    if (ev_cleared) n_clr++;
    check(!ev_dropped, "no drop");
  end

  task automatic cpu_write(logic [4:0] a, logic [7:0] d);
    @(negedge clk) begin cpu_addr = a; cpu_wdata = d; cpu_wr = 1; end
    @(negedge clk) cpu_wr = 0;
  endtask

  // processor model: poll the status register, answer "last 4 bytes ready"
  initial forever begin
    @(negedge clk);
    if (poll_en) begin
      cpu_addr = 5'h01;
      #1;
      check(cpu_rdata[2] == last_ready && cpu_rdata[0] == running, "status register");
      if (cpu_rdata[2]) begin
        repeat ($urandom_range(2, 100)) @(negedge clk);
        cpu_addr = 5'h02;
        #1 check(cpu_rdata == 8'(dut.u_fifo.count), "FIFO level register");
        cpu_write(5'h00, 8'h04);
        while (last_ready) @(negedge clk);
      end
    end
  end

  initial begin
    for (int p = 0; p < 2; p++) begin
      tac[p] = '0;
      for (int c = 0; c < 4; c++) adc[p][c] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    cpu_write(5'h00, 8'h01);
    while (!running) @(negedge clk);
    run_at = cyc;       // count is 0 in this cycle
    poll_en = 1;
    for (int e = 0; e < 45; e++) begin
      int pmt, sum [4];
      bit acc;
      event_t ev;
      logic [EVENT_BITS-1:0] v;
      acc = (e % 5 != 4);
      repeat ($urandom_range(1, 6)) @(negedge clk);
      for (int p = 0; p < 2; p++) tac[p] = TAC_W'($urandom);
      pmt = $urandom_range(0, 1);
      trig = 2'(1 << pmt);
      ev = '0;
      ev.id.pmt_id = 1'(pmt);
      ev.id.module_id = MID;
      ev.timestamp = 32'(cyc - run_at);
      ev.tac = tac[pmt][TAC_W-1 -: 8];
      for (int k = 0; k < N + 2; k++) begin
        if (k < N) for (int c = 0; c < 4; c++) begin
          adc[pmt][c] = 10'($urandom_range(0, 1023));
          adc[1-pmt][c] = 10'($urandom);
          if (k == 0) sum[c] = adc[pmt][c]; else sum[c] += adc[pmt][c];
        end
        @(negedge clk);
        trig = 0;
        if (k == 0) check(event_trig, "event trigger to coincidence controller");
        accept = acc && (k == 2);
      end
      accept = 0;
      ev.x_minus = 16'(sum[0] >> 2); ev.x_plus = 16'(sum[1] >> 2);
      ev.y_minus = 16'(sum[2] >> 2); ev.y_plus = 16'(sum[3] >> 2);
      v = ev;
      if (acc) for (int k = 0; k < 4; k++) expq.push_back(v[EVENT_BITS-1-32*k -: 32]);
    end
    repeat (500) @(negedge clk);
    check(blocks == 3, $sformatf("blocks %0d", blocks));
    check(nq == 36 * 4, $sformatf("quadlets %0d", nq));
    check(n_clr == 9, $sformatf("cleared %0d", n_clr));
    poll_en = 0;
    repeat (3) @(negedge clk);
    cpu_write(5'h00, 8'h02);
    @(negedge clk) check(!running, "stop through the control register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
