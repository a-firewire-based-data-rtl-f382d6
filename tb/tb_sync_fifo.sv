// tb_sync_fifo - self-checking test of the event FIFO.
// Random pushes and pops against a queue reference model: head word, full,
// empty and count are compared every cycle; fill to full and drain to empty
// are forced at the start and the end.
module tb_sync_fifo;
  localparam int W = 128, D = 64;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] din = '0, dout;
  logic full, empty;
  logic [$clog2(D):0] count;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic step(bit w, bit r);
    wr_en = w; rd_en = r;
    din = {$urandom, $urandom, $urandom, $urandom};
    @(posedge clk);
    // reference update with the values seen at the edge
    begin
      bit can_w, can_r;
      can_w = w && q.size() < D;
      can_r = r && q.size() > 0;
      if (can_r) void'(q.pop_front());
      if (can_w) q.push_back(din);
    end
    #1;
    check(count == q.size(), $sformatf("count %0d vs %0d", count, q.size()));
    check(empty == (q.size() == 0), "empty");
    check(full == (q.size() == D), "full");
    if (q.size() > 0) check(dout == q[0], "head word");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    for (int i = 0; i < D + 5; i++) step(1, 0);      // fill past full
    for (int i = 0; i < 3000; i++) step($urandom_range(0, 1), $urandom_range(0, 1));
    for (int i = 0; i < D + 5; i++) step(0, 1);      // drain past empty
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
