// tb_event_capture - drives PMT triggers, TAC values and ADC samples into
// one node's event capture and plays the coincidence controller: the accept
// pulse comes at a random delay inside the timeout, or not at all, and the
// event FIFO is sometimes full. Every packet is compared field by field with
// one built here from the driven values (time stamp, TAC MSBs, integrated
// signals, singles, IDs), and the cycle of event_trig, ev_valid, cleared and
// dropped is checked.
module tb_event_capture;
  import emices_pkg::*;
  localparam int N = 16, TMO = 8, TAC_W = 10;
  logic clk = 0, rst_n = 0, running = 0;
  logic [31:0] timestamp = 0;
  logic [5:0] module_id = 6'd37;
  logic [1:0] trig = 0;
  logic [TAC_W-1:0] tac [2];
  adc_t adc [2][4];
  logic [7:0] singles [2];
  logic event_trig, accept = 0, ev_full = 0, ev_valid, busy, cleared, dropped;
  event_t ev_data;
  int checks = 0, failures = 0;
  int n_acc = 0, n_clr = 0, n_drop = 0;

  event_capture #(.TAC_W(TAC_W), .N_SAMPLES(N), .ACCEPT_TIMEOUT(TMO)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) timestamp <= timestamp + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic rand_inputs();
    for (int p = 0; p < 2; p++) begin
      tac[p] = TAC_W'($urandom);
      for (int c = 0; c < 4; c++) adc[p][c] = 10'($urandom);
    end
  endtask

  initial begin
    for (int p = 0; p < 2; p++) singles[p] = 8'(p * 40 + 3);
    rand_inputs();
    repeat (3) @(posedge clk);
    rst_n = 1;
    // no capture while not running
    @(negedge clk); trig = 2'b01;
    @(negedge clk); trig = 0;
    check(!busy && !event_trig, "ignored while stopped");
    running = 1;
    for (int t = 0; t < 300; t++) begin
      int pmt, acc_at, mode;
      int sum [4];
      logic [31:0] ts_exp;
      logic [7:0] tac_exp;
      bit got_valid, got_clr, got_drop;
      mode = $urandom_range(0, 9);       // 0..5 accept, 6..7 none, 8..9 accept with FIFO full
      acc_at = (mode <= 5 || mode >= 8) ? $urandom_range(1, TMO) : -1;
      ev_full = (mode >= 8);
      singles[0] = 8'($urandom); singles[1] = 8'($urandom);
      repeat ($urandom_range(0, 4)) @(negedge clk);
      rand_inputs();
      trig = 2'($urandom_range(1, 3));
      pmt = trig[0] ? 0 : 1;
      ts_exp = timestamp;
      tac_exp = tac[pmt][TAC_W-1 -: 8];
      for (int c = 0; c < 4; c++) sum[c] = adc[pmt][c];
      got_valid = 0; got_clr = 0; got_drop = 0;
      for (int k = 1; k <= N + 4; k++) begin
        @(negedge clk);
        trig = (k < TMO && $urandom_range(0, 3) == 0) ? 2'b11 : 2'b00;  // ignored while busy
        accept = (k == acc_at);
        if (k == 1) check(event_trig, "event_trig one cycle after trigger");
        else        check(!event_trig, "single event_trig");
        if (ev_valid) begin
          got_valid = 1;
          check(k == N + 1, $sformatf("ev_valid at +%0d", k));
          check(ev_data.id.zero == 0 && ev_data.id.pmt_id == 1'(pmt) && ev_data.id.module_id == module_id, "id byte");
          check(ev_data.timestamp == ts_exp, $sformatf("timestamp %0d vs %0d", ev_data.timestamp, ts_exp));
          check(ev_data.tac == tac_exp, "tac");
          check(ev_data.x_minus == 16'(sum[0] >> 2), "x-");
          check(ev_data.x_plus  == 16'(sum[1] >> 2), "x+");
          check(ev_data.y_minus == 16'(sum[2] >> 2), "y-");
          check(ev_data.y_plus  == 16'(sum[3] >> 2), "y+");
          check(ev_data.singles0 == singles[0] && ev_data.singles1 == singles[1], "singles");
        end
        if (cleared) begin got_clr = 1; check(k == TMO + 1, $sformatf("cleared at +%0d", k)); end
        if (dropped) begin got_drop = 1; check(k == N + 1, "dropped timing"); end
        if (k < N) for (int c = 0; c < 4; c++) begin
          adc[pmt][c] = 10'($urandom);
          adc[1-pmt][c] = 10'($urandom);
          sum[c] += adc[pmt][c];
        end else rand_inputs();
      end
      accept = 0;
      trig = 0;
      if (mode <= 5)      begin check(got_valid && !got_clr && !got_drop, "accepted event stored"); n_acc++; end
      else if (mode <= 7) begin check(!got_valid && got_clr, "unaccepted event cleared"); n_clr++; end
      else                begin check(!got_valid && got_drop, "event dropped on full FIFO"); n_drop++; end
      ev_full = 0;
      @(negedge clk);
      check(!busy, "idle after event");
    end
    check(n_acc > 0 && n_clr > 0 && n_drop > 0, "all outcomes seen");
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
