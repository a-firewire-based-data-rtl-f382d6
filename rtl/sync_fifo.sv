// sync_fifo - single-clock first-in first-out buffer.
//
// Used as the event FIFO of a node FPGA: accepted 16-byte events wait here
// until the Firewire FIFO loader takes them, including the time the node
// processor spends writing a block header. A circular buffer of DEPTH words
// with read and write pointers one bit wider than the address. The head word
// is always visible on dout (first-word fall-through); rd_en pops it.
// Writes to a full FIFO and reads from an empty one are ignored. The depth is
// this design's choice; the published design only says the FPGA holds FIFO buffers.
module sync_fifo #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         din,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         dout,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             do_wr, do_rd;

  assign count = wptr - rptr;
  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (wptr == rptr);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign dout  = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end

  // DEPTH must be a power of two for the pointer arithmetic above.
  initial assert ((1 << AW) == DEPTH) else $error("sync_fifo: DEPTH must be a power of two");
endmodule
