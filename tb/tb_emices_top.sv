// tb_emices_top - the whole acquisition core at its default size (36 nodes,
// 2016-byte blocks, 10 ms status and singles periods) through a run of
// about 11.5 ms of scanner time.
//
// Stimulus, one group every 28 master cycles: a true coincidence (two
// opposite-fan nodes firing 0..2 cycles apart), a lone single, a pair
// outside the angular window, or an opposite pair 3..5 cycles apart (outside
// the 40 ns window). Every node's processor is modelled on its register
// bus: start commands reach the nodes skewed by up to 3 cycles, and each
// answers last_ready with a send-last command after 50..400 cycles, except one long stall on node 0 that overflows its
// event FIFO. Each node's controller FIFO stream is compared quadlet by
// quadlet with packets built here from the driven inputs, including the
// singles bytes (triggers of the first 10 ms interval / 256).
// Counted mechanisms, each of which must occur: aligned start, coincidence
// accepted, single cleared, angular rejection, window rejection, block
// hand-shake, events queued while a header is pending, FIFO overflow drop,
// status record, nonzero singles rate.
module tb_emices_top;
  import emices_pkg::*;
  localparam int N = 36, NC = 18, TAC_W = 10, PERIOD = 625000, QB = 504;
  localparam int RUN_CYC = 720000;

  logic clk = 0, rst_n = 0;
  logic [4:0] ccb_cpu_addr = 0;
  logic ccb_cpu_wr = 0;
  logic [7:0] ccb_cpu_wdata = 0, ccb_cpu_rdata;
  logic ccb_running, sync_clk, status_valid, coinc;
  logic [15:0] gantry_pos = 0, status_pos;
  logic [3:0] gate = 0, status_gate;
  logic [31:0] status_ts;
  logic [4:0] cpu_addr [N];
  logic [N-1:0] cpu_wr = '0;
  logic [7:0] cpu_wdata [N], cpu_rdata [N];
  logic [N-1:0] node_running, last_ready;
  logic [1:0] pmt_trig [N];
  logic [TAC_W-1:0] pmt_tac [N][2];
  adc_t pmt_adc [N][2][4];
  logic [N-1:0] ti_wr, ti_full = '0, event_trig, accept, block_done, ev_cleared, ev_dropped, ev_stored;
  logic [31:0] ti_data [N];

  emices_top dut (.*);

  typedef struct { event_t ev; bit acc; } pend_t;
  pend_t pend [N][$];
  logic [31:0] expq [N][$];
  int blocks [N];
  int cnt_single [N][2];

  int checks = 0, failures = 0, cyc = 0, run_at = -1;
  int m_aligned = 0, m_coinc = 0, m_single = 0, m_angle = 0, m_window = 0;
  int m_block = 0, m_queued = 0, m_drop = 0, m_status = 0, m_singles = 0;
  logic [15:0] pos_q;
  logic [3:0] gate_q;

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  function automatic int cdist(int a, int b);
    int d;
    d = a / 2 - b / 2;
    if (d < 0) d = -d;
    return (NC - d < d) ? NC - d : d;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    pos_q <= gantry_pos; gate_q <= gate;
    gantry_pos <= gantry_pos + 16'd3;
    gate <= 4'(cyc >> 12);
    for (int n = 0; n < N; n++) ti_full[n] <= ($urandom_range(0, 15) == 0);
  end

  // monitors: controller FIFO streams, event outcomes, status records
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      if (ti_wr[n]) begin
        check(expq[n].size() > 0 && ti_data[n] == expq[n][0], $sformatf("node %0d quadlet", n));
        if (expq[n].size() > 0) void'(expq[n].pop_front());
      end
      if (block_done[n]) begin blocks[n]++; m_block++; end
      if (ev_stored[n] || ev_dropped[n] || ev_cleared[n]) begin
        check(pend[n].size() > 0, "outcome without a trigger");
        if (pend[n].size() > 0) begin
          pend_t p;
          logic [EVENT_BITS-1:0] v;
          p = pend[n].pop_front();
          check(p.acc == !ev_cleared[n], $sformatf("node %0d accept decision", n));
          if (ev_stored[n]) begin
            if (last_ready[n]) m_queued++;
            if (p.ev.timestamp >= PERIOD) begin
              p.ev.singles0 = 8'(cnt_single[n][0] / 256);
              p.ev.singles1 = 8'(cnt_single[n][1] / 256);
              if (p.ev.singles0 != 0 || p.ev.singles1 != 0) m_singles++;
            end
            v = p.ev;
            for (int k = 0; k < 4; k++) expq[n].push_back(v[EVENT_BITS-1-32*k -: 32]);
          end
          if (ev_dropped[n]) m_drop++;
        end
      end
    end
    if (status_valid) begin
      m_status++;
      check(status_ts == 32'(m_status * PERIOD - 1), $sformatf("status time stamp %0d", status_ts));
      check(status_pos == pos_q && status_gate == gate_q, "status content");
    end
  end

  // node processors: block hand-shake
  for (genvar n = 0; n < N; n++) begin : g_cpu
    initial begin
      bit stalled = 0;
      forever begin
        @(posedge clk);
        if (last_ready[n]) begin
          if (n == 0 && !stalled) begin
            stalled = 1;
            repeat (150000) @(posedge clk);
          end else repeat ($urandom_range(50, 400)) @(posedge clk);
          @(negedge clk) begin cpu_addr[n] = 5'h00; cpu_wdata[n] = 8'h04; cpu_wr[n] = 1; end
          @(negedge clk) cpu_wr[n] = 0;
          while (last_ready[n]) @(posedge clk);
        end
      end
    end
  end

  // fire one node: inputs held constant for the integration
  task automatic fire(int n, bit acc);
    pend_t p;
    int pmt;
    pmt = $urandom_range(0, 1);
    for (int q = 0; q < 2; q++) begin
      pmt_tac[n][q] = TAC_W'($urandom);
      for (int c = 0; c < 4; c++) pmt_adc[n][q][c] = 10'($urandom);
    end
    pmt_trig[n] = 2'(1 << pmt);
    p.acc = acc;
    p.ev = '0;
    p.ev.id.pmt_id = 1'(pmt);
    p.ev.id.module_id = 6'(n);
    p.ev.timestamp = 32'(cyc - run_at);
    p.ev.tac = pmt_tac[n][pmt][TAC_W-1 -: 8];
    p.ev.x_minus = 16'(4 * pmt_adc[n][pmt][0]);
    p.ev.x_plus  = 16'(4 * pmt_adc[n][pmt][1]);
    p.ev.y_minus = 16'(4 * pmt_adc[n][pmt][2]);
    p.ev.y_plus  = 16'(4 * pmt_adc[n][pmt][3]);
    pend[n].push_back(p);
    if (cyc - run_at < PERIOD) cnt_single[n][pmt]++;
  endtask

  task automatic clear_trig();
    for (int n = 0; n < N; n++) pmt_trig[n] = '0;
  endtask

  initial begin
    for (int n = 0; n < N; n++) begin
      pmt_trig[n] = '0;
      cpu_addr[n] = '0;
      cpu_wdata[n] = '0;
      blocks[n] = 0;
      cnt_single[n][0] = 0; cnt_single[n][1] = 0;
      for (int q = 0; q < 2; q++) begin
        pmt_tac[n][q] = '0;
        for (int c = 0; c < 4; c++) pmt_adc[n][q][c] = '0;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // start commands right after a sync clock rising edge, skewed per node
    @(posedge sync_clk);
    @(negedge clk);
    ccb_cpu_addr = 5'h00; ccb_cpu_wdata = 8'h01; ccb_cpu_wr = 1;
    for (int s = 0; s < 4; s++) begin
      for (int n = 0; n < N; n++) begin
        cpu_addr[n] = 5'h00; cpu_wdata[n] = 8'h01; cpu_wr[n] = (n % 4 == s);
      end
      @(negedge clk);
      ccb_cpu_wr = 0;
    end
    cpu_wr = '0;
    while (!ccb_running) @(negedge clk);
    run_at = cyc;
    check(node_running == '1, "all nodes start on the same sync edge");
    if (node_running == '1) m_aligned++;

    while (cyc - run_at < RUN_CYC) begin
      int kind, a, b, gap, t;
      t = cyc - run_at;
      if (t > PERIOD - 100 && t < PERIOD + 200) begin @(negedge clk); continue; end
      kind = $urandom_range(0, 9);
      a = $urandom_range(0, N - 1);
      if (kind <= 6 || kind == 9) begin
        b = (a + 12 + $urandom_range(0, 12)) % N;        // opposite fan
        while (cdist(a, b) < 6) b = (b + 1) % N;
      end else if (kind == 8) begin
        b = (a + 2 + $urandom_range(0, 9)) % N;          // inside 5 cassettes
        while (cdist(a, b) >= 6 || a / 2 == b / 2) b = (b + N - 1) % N;
      end
      gap = (kind == 9) ? $urandom_range(3, 5) : $urandom_range(0, 2);
      if (kind == 7) begin
        fire(a, 0); m_single++;
        @(negedge clk) clear_trig();
      end else begin
        fire(a, kind <= 6);
        if (gap == 0) fire(b, kind <= 6);
        @(negedge clk) clear_trig();
        if (gap > 0) begin
          repeat (gap - 1) @(negedge clk);
          fire(b, kind <= 6);
          @(negedge clk) clear_trig();
        end
        if (kind <= 6) m_coinc++; else if (kind == 8) m_angle++; else m_window++;
      end
      repeat (28 - 1 - gap) @(negedge clk);
    end
    repeat (60000) @(negedge clk);
    for (int n = 0; n < N; n++) begin cpu_addr[n] = 5'h00; cpu_wdata[n] = 8'h02; end
    cpu_wr = '1;
    ccb_cpu_addr = 5'h00; ccb_cpu_wdata = 8'h02; ccb_cpu_wr = 1;
    @(negedge clk) begin cpu_wr = '0; ccb_cpu_wr = 0; end
    @(negedge clk);
    check(node_running == '0 && !ccb_running, "stopped");
    for (int n = 0; n < N; n++) begin
      check(blocks[n] >= 1, $sformatf("node %0d sent %0d blocks", n, blocks[n]));
      check(pend[n].size() == 0, $sformatf("node %0d outcomes pending %0d", n, pend[n].size()));
      check(expq[n].size() == 0 || last_ready[n] || expq[n].size() < 4, "stream drained");
    end
    $display("mechanisms: aligned_start=%0d coincidences=%0d singles_cleared=%0d angular_rejects=%0d window_rejects=%0d",
             m_aligned, m_coinc, m_single, m_angle, m_window);
    $display("mechanisms: blocks=%0d queued_during_header=%0d fifo_drops=%0d status_records=%0d nonzero_singles=%0d",
             m_block, m_queued, m_drop, m_status, m_singles);
    check(m_aligned > 0, "aligned start");
    check(m_coinc > 0, "coincidence");
    check(m_single > 0, "single cleared");
    check(m_angle > 0, "angular rejection");
    check(m_window > 0, "window rejection");
    check(m_block > 0, "block hand-shake");
    check(m_queued > 0, "events queued during header");
    check(m_drop > 0, "fifo overflow");
    check(m_status > 0, "status record");
    check(m_singles > 0, "singles rate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (RUN_CYC + 200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
