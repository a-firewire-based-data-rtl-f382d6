// block_loader - fills the Firewire controller FIFO one block at a time.
//
// Accepted events are moved from the event FIFO into the built-in FIFO of
// the node's 1394a link controller, four 32-bit quadlets per 16-byte event,
// first byte in the most significant position. A block carries BLOCK_BYTES
// (2016) bytes of payload. After BLOCK_BYTES-HOLD_BYTES (2012) bytes the
// loader stops, keeps the last quadlet of the block in a holding register
// and raises last_ready to the node processor. The processor then writes the
// block's return header into the controller registers and pulses send_last;
// the loader writes the held quadlet, which starts the controller's
// automatic send, and continues with the next block. Events arriving in the
// meantime wait in the event FIFO. This hand-shake is the published eMiCES design's; the
// 32-bit write port with a full flag, and the absence of a flush for a last
// partial block, are this design's choices.
//
// Interface: the event FIFO is read first-word fall-through (ev_data is the
// head, ev_rd pops it). ti_wr/ti_data are combinational: a quadlet is
// written in every cycle where ti_wr is high, which never happens while
// ti_full is high. block_done pulses with the write of the held quadlet.
module block_loader
  import emices_pkg::*;
#(
  parameter int unsigned BLOCK_BYTES = BLOCK_PAYLOAD,
  parameter int unsigned HOLD_BYTES  = BLOCK_HOLD
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ev_empty,
  input  logic [EVENT_BITS-1:0] ev_data,
  output logic                  ev_rd,
  output logic                  ti_wr,
  output logic [31:0]           ti_data,
  input  logic                  ti_full,
  output logic                  last_ready,
  input  logic                  send_last,
  output logic                  block_done
);
  localparam int unsigned Q_PER_EV = EVENT_BYTES / 4;
  localparam int unsigned Q_DIRECT = (BLOCK_BYTES - HOLD_BYTES) / 4;
  localparam int unsigned BQW      = $clog2(Q_DIRECT + 1);
  localparam int unsigned QIW      = $clog2(Q_PER_EV);

  typedef enum logic [1:0] { S_STREAM, S_HOLD, S_SEND } state_t;

  state_t          state;
  logic [QIW-1:0]  qi;       // quadlet of the head event to send next
  logic [BQW-1:0]  bq;       // quadlets of this block already written
  logic [31:0]     hold_q;
  logic [31:0]     cur_q;
  logic            take;     // head quadlet consumed this cycle
  logic            direct;

  assign cur_q  = ev_data[EVENT_BITS-1-32*qi -: 32];
  assign direct = (bq != BQW'(Q_DIRECT));
  assign take   = (state == S_STREAM) && !ev_empty && (!direct || !ti_full);
  assign ev_rd  = take && (qi == QIW'(Q_PER_EV - 1));

  assign ti_wr      = ((state == S_STREAM) && !ev_empty && direct && !ti_full)
                   || ((state == S_SEND) && !ti_full);
  assign ti_data    = (state == S_SEND) ? hold_q : cur_q;
  assign last_ready = (state != S_STREAM);
  assign block_done = (state == S_SEND) && !ti_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_STREAM;
      qi     <= '0;
      bq     <= '0;
      hold_q <= '0;
    end else begin
      if (take) qi <= qi + 1'b1;   // wraps after the last quadlet
      unique case (state)
        S_STREAM: if (take) begin
          if (direct) begin
            bq <= bq + 1'b1;
          end else begin
            hold_q <= cur_q;
            state  <= S_HOLD;
          end
        end
        S_HOLD: if (send_last) state <= S_SEND;
        S_SEND: if (!ti_full) begin
          bq    <= '0;
          state <= S_STREAM;
        end
        default: state <= S_STREAM;
      endcase
    end
  end

  initial begin
    assert (HOLD_BYTES == 4) else $error("block_loader: one held quadlet supported");
    assert (BLOCK_BYTES % 4 == 0) else $error("block_loader: block must be whole quadlets");
  end
  a_no_write_when_full: assert property (@(posedge clk) disable iff (!rst_n) ti_full |-> !ti_wr);
endmodule
