// tb_block_loader - feeds random events and checks the quadlet stream into
// the controller FIFO: order and content equal the events' bytes, exactly
// 503 quadlets (2012 bytes) per block are written before last_ready rises,
// nothing is written while the node processor prepares the header, the held
// quadlet is the block's 504th and goes out on send_last with block_done.
// The controller FIFO applies random back-pressure; events arrive in bursts
// so the event queue both runs dry and backs up.
module tb_block_loader;
  import emices_pkg::*;
  localparam int BLOCK = 2016, QB = BLOCK / 4, NBLK = 4;
  logic clk = 0, rst_n = 0;
  logic ev_empty, ev_rd, ti_wr, ti_full = 0, last_ready, send_last = 0, block_done;
  logic [EVENT_BITS-1:0] ev_data;
  logic [31:0] ti_data;
  logic [EVENT_BITS-1:0] evq[$];
  logic [31:0] expq[$];
  int checks = 0, failures = 0;
  int in_block = 0, blocks = 0, nwr = 0, holds_with_backlog = 0;

  block_loader #(.BLOCK_BYTES(BLOCK), .HOLD_BYTES(4)) dut (.*);

  assign ev_empty = (evq.size() == 0);
  assign ev_data  = ev_empty ? '0 : evq[0];

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (block %0d quadlet %0d)", what, blocks, in_block); end
  endtask

  // monitor and event-FIFO model
  always @(posedge clk) if (rst_n) begin
    if (ti_wr) begin
      check(!ti_full, "write while full");
      check(expq.size() > 0 && ti_data == expq[0], "quadlet content/order");
      if (expq.size() > 0) void'(expq.pop_front());
      nwr++;
      if (block_done) begin
        check(in_block == QB - 1, "held quadlet is the last of the block");
        in_block = 0;
        blocks++;
      end else begin
        check(!last_ready, "no stream write while header pending");
        in_block++;
      end
    end
    if (ev_rd) begin
      check(!ev_empty, "read from empty");
      if (!ev_empty) void'(evq.pop_front());
    end
  end

  // last_ready must rise exactly after 503 quadlets
  always @(posedge clk) if (rst_n && last_ready && !ti_wr)
    check(in_block == QB - 1, "last_ready after 2012 bytes");

  // processor model: answer last_ready after a random delay
  initial begin
    forever begin
      @(posedge clk);
      if (last_ready && !send_last) begin
        repeat ($urandom_range(5, 300)) @(posedge clk);
        if (evq.size() > 0) holds_with_backlog++;
        send_last <= 1;
        @(posedge clk);
        send_last <= 0;
        while (last_ready) @(posedge clk);
      end
    end
  end

  always @(posedge clk) ti_full <= ($urandom_range(0, 5) == 0);

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int e = 0; e < NBLK * QB / 4 + 10; e++) begin
      logic [EVENT_BITS-1:0] v;
      v = {$urandom, $urandom, $urandom, $urandom};
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 40)) @(posedge clk);
      @(posedge clk);
      evq.push_back(v);
      for (int k = 0; k < 4; k++) expq.push_back(v[EVENT_BITS-1-32*k -: 32]);
    end
    wait (blocks == NBLK);
    repeat (200) @(posedge clk);
    check(blocks == NBLK, "blocks sent");
    check(nwr == NBLK * QB + 40 || nwr == NBLK * QB + 39, $sformatf("quadlets written %0d", nwr));
    check(holds_with_backlog > 0, "events queued while header pending");
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
