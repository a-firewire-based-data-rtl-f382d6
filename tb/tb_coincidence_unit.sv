// tb_coincidence_unit - random event triggers on 36 nodes against a
// reference built from trigger times: a node is accepted in the cycle after
// it and a partner in the opposite fan (cassette distance >= 6 on the ring
// of 18) triggered at most 2 cycles (40 ns) apart. Directed pairs check the
// window edge (2 cycles accepted, 3 rejected) and the fan edge. The random
// phase is repeated with the run-time settings changed to a 4-cycle window
// with separation 8, and to a same-cycle-only window with separation 3.
module tb_coincidence_unit;
  localparam int N = 36, NPC = 2, NC = N / NPC;
  int W = 2, SEP = 6;
  logic [4:0] win_cyc;
  logic [4:0] min_sep;
  assign win_cyc = 5'(W);
  assign min_sep = 5'(SEP);
  logic clk = 0, rst_n = 0;
  logic [N-1:0] trig = '0, accept;
  logic coinc;
  int checks = 0, failures = 0;
  longint lt [N];
  longint cyc = 0;
  logic [N-1:0] exp_acc = '0;
  int n_coinc = 0, n_reject_time = 0;

  coincidence_unit #(.N_NODES(N), .NODES_PER_CASSETTE(NPC), .WINDOW_MAX(15)) dut (.*);

  always #5 clk = ~clk;

  function automatic bit opposite(int a, int b);
    int d;
    d = a / NPC - b / NPC;
    if (d < 0) d = -d;
    if (NC - d < d) d = NC - d;
    return a != b && d >= SEP;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // reference: decide at each edge from the trigger times
  always @(posedge clk) if (rst_n) begin
    logic [N-1:0] e;
    e = '0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        if (opposite(i, j) && trig[i] && (trig[j] || (cyc - lt[j] <= W))) begin
          e[i] = 1; e[j] = 1;
        end
    for (int i = 0; i < N; i++) if (trig[i]) lt[i] = cyc;
    #1;
    check(accept == e, $sformatf("accept %h expected %h", accept, e));
    check(coinc == (e != 0), "coinc flag");
    if (e != 0) n_coinc++;
    cyc++;
  end

  task automatic pulse(logic [N-1:0] v);
    @(negedge clk); trig = v;
    @(negedge clk); trig = '0;
  endtask

  initial begin
    for (int i = 0; i < N; i++) lt[i] = -1000;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // window edge: node 0 and node 18 (opposite cassettes 0 and 9)
    pulse(N'(1) << 0); @(negedge clk); trig = N'(1) << 18; @(negedge clk); trig = '0;   // 2 apart
    repeat (6) @(negedge clk);
    pulse(N'(1) << 0); repeat (2) @(negedge clk); trig = N'(1) << 18; @(negedge clk); trig = '0;  // 3 apart
    repeat (6) @(negedge clk);
    // fan edge: cassette 0 with cassette 6 (accepted) and 5 (rejected)
    pulse((N'(1) << 1) | (N'(1) << 12)); repeat (6) @(negedge clk);
    pulse((N'(1) << 1) | (N'(1) << 10)); repeat (6) @(negedge clk);
    for (int phase = 0; phase < 3; phase++) begin
      if (phase == 1) begin W = 4; SEP = 8; end
      if (phase == 2) begin W = 0; SEP = 3; end
      for (int c = 0; c < 20000; c++) begin
        @(negedge clk);
        for (int i = 0; i < N; i++) trig[i] = ($urandom_range(0, 199) == 0);
      end
      @(negedge clk) trig = '0;
      repeat (8) @(negedge clk);
    end
    check(n_coinc > 100, $sformatf("coincidences seen %0d", n_coinc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (150000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
