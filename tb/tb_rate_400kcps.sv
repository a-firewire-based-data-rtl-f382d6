// tb_rate_400kcps - the whole acquisition core at its default size under the
// scanner's peak load: 400 k true coincidences per second, with every node
// processor taking 200..400 us to set up each block header.
//
// Stimulus: one coincidence every 156 master cycles (2.5 us, i.e. 400 kcps)
// between two random nodes in opposite fans, 0..2 cycles apart, plus one
// lone single on a random node halfway between coincidences. Each node's
// processor answers last_ready after 12 500..25 000 cycles (200..400 us):
// it first reads the event FIFO level and the drop counter over its
// register bus, then writes the send-last bit. The run lasts 1.2 M cycles
// (19.2 ms), long enough for every node to complete at least two blocks.
// Checks: every coincidence is accepted (coinc pulse and both accept
// lines), every accepted event is stored and none dropped, the drop
// counters read 0, the FIFO never fills while a header is pending, the
// quadlet count per node matches the stored events, and the accepted rate
// is at least 400 kcps. The largest FIFO level seen is printed.
module tb_rate_400kcps;
  import emices_pkg::*;
  localparam int N = 36, TAC_W = 10, QB = 504;
  localparam int SLOT = 156;                 // 2.496 us per coincidence
  localparam int RUN_CYC = 1200000;

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

  int checks = 0, failures = 0;
  int n_driven = 0, n_coinc = 0, n_accept = 0, n_stored = 0, n_dropped = 0;
  int quads [N], stored [N], blocks [N];
  int max_level = 0, min_blocks;

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int cdist(int a, int b);
    int d;
    d = (a / 2 > b / 2) ? a / 2 - b / 2 : b / 2 - a / 2;
    return (d > 9) ? 18 - d : d;
  endfunction

  task automatic clear_trig();
    for (int n = 0; n < N; n++) pmt_trig[n] = '0;
  endtask

  task automatic fire(int n);
    int q;
    q = $urandom_range(0, 1);
    pmt_tac[n][q] = TAC_W'($urandom);
    for (int c = 0; c < 4; c++) pmt_adc[n][q][c] = 10'($urandom);
    pmt_trig[n][q] = 1'b1;
  endtask

  // counted on the falling edge, where every output of the cycle is settled
  always @(negedge clk) begin
    if (coinc) n_coinc++;
    for (int n = 0; n < N; n++) begin
      if (accept[n]) n_accept++;
      if (ev_stored[n]) begin n_stored++; stored[n]++; end
      if (ev_dropped[n]) n_dropped++;
      if (ti_wr[n]) quads[n]++;
      if (block_done[n]) blocks[n]++;
    end
  end

  // node processors: read level and drop counter, then release the block
  for (genvar n = 0; n < N; n++) begin : g_cpu
    initial begin
      cpu_addr[n] = '0;
      cpu_wdata[n] = '0;
      forever begin
        @(posedge clk);
        if (last_ready[n]) begin
          repeat ($urandom_range(12500, 25000)) @(posedge clk);
          @(negedge clk) cpu_addr[n] = 5'h02;
          @(negedge clk) begin
            if (int'(cpu_rdata[n]) > max_level) max_level = int'(cpu_rdata[n]);
            check(cpu_rdata[n] < 8'd64, $sformatf("node %0d FIFO full during header", n));
            cpu_addr[n] = 5'h03;
          end
          @(negedge clk) begin
            check(cpu_rdata[n] == 8'd0, $sformatf("node %0d drop counter %0d", n, cpu_rdata[n]));
            cpu_addr[n] = 5'h00; cpu_wdata[n] = 8'h04; cpu_wr[n] = 1;
          end
          @(negedge clk) cpu_wr[n] = 0;
          while (last_ready[n]) @(posedge clk);
        end
      end
    end
  end

  initial begin
    int a, b, gap, t0;
    clear_trig();
    for (int n = 0; n < N; n++) begin
      quads[n] = 0; stored[n] = 0; blocks[n] = 0;
      for (int q = 0; q < 2; q++) begin
        pmt_tac[n][q] = '0;
        for (int c = 0; c < 4; c++) pmt_adc[n][q][c] = '0;
      end
    end
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    // start: controller first, then every node
    ccb_cpu_addr = 5'h00; ccb_cpu_wdata = 8'h01; ccb_cpu_wr = 1;
    @(negedge clk) ccb_cpu_wr = 0;
    for (int n = 0; n < N; n++) begin cpu_addr[n] = 5'h00; cpu_wdata[n] = 8'h01; end
    cpu_wr = '1;
    @(negedge clk) cpu_wr = '0;
    while (!(ccb_running && node_running == '1)) @(negedge clk);
    repeat (20) @(negedge clk);
    t0 = 0;

    while (t0 < RUN_CYC) begin
      a = $urandom_range(0, N - 1);
      b = (a + 12 + $urandom_range(0, 12)) % N;
      while (cdist(a, b) < 6) b = (b + 1) % N;
      gap = $urandom_range(0, 2);
      fire(a);
      if (gap == 0) fire(b);
      @(negedge clk) clear_trig();
      if (gap > 0) begin
        repeat (gap - 1) @(negedge clk);
        fire(b);
        @(negedge clk) clear_trig();
      end
      n_driven++;
      repeat (SLOT / 2 - 1 - gap) @(negedge clk);
      fire($urandom_range(0, N - 1));
      @(negedge clk) clear_trig();
      repeat (SLOT - SLOT / 2 - 1) @(negedge clk);
      t0 += SLOT;
    end
    repeat (100) @(negedge clk);

    check(n_coinc == n_driven, $sformatf("coincidences %0d of %0d driven", n_coinc, n_driven));
    check(n_accept == 2 * n_driven, $sformatf("accepts %0d", n_accept));
    check(n_stored == 2 * n_driven, $sformatf("stored %0d", n_stored));
    check(n_dropped == 0, $sformatf("dropped %0d", n_dropped));
    // accepted rate: coincidences per second of scanner time (16 ns cycles)
    check(real'(n_coinc) / (real'(RUN_CYC) * 16.0e-9) >= 399.0e3, "rate at least 400 kcps");
    min_blocks = blocks[0];
    for (int n = 0; n < N; n++) begin
      if (blocks[n] < min_blocks) min_blocks = blocks[n];
      check(blocks[n] >= 2, $sformatf("node %0d completed %0d blocks", n, blocks[n]));
      check(quads[n] >= blocks[n] * QB && quads[n] <= 4 * stored[n],
            $sformatf("node %0d quadlets %0d for %0d events, %0d blocks", n, quads[n], stored[n], blocks[n]));
    end
    $display("rate: %0d coincidences in %0d cycles = %0d kcps; %0d events stored, %0d dropped",
             n_coinc, RUN_CYC, int'(real'(n_coinc) / (real'(RUN_CYC) * 16.0e-6)), n_stored, n_dropped);
    $display("blocks: fewest per node %0d; largest event FIFO level at header %0d of 64", min_blocks, max_level);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (RUN_CYC + 100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
