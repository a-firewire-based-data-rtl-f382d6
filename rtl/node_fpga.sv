// node_fpga - FPGA logic of one Firewire node (two PMTs).
//
// One node turns the digitized signals of two PMTs into Firewire blocks:
//   time_scaler      run time clock, started on the sync clock edge
//   singles_scaler   trigger rate of each PMT for the packet's singles bytes
//   event_capture    trigger, time stamp, integration, coincidence hand-shake
//   sync_fifo        event FIFO for accepted 16-byte packets
//   block_loader     writes the controller FIFO, holds the last 4 bytes of
//                    each 2016-byte block for the processor hand-shake
//   node_regs        processor registers: start, stop, send last 4 bytes,
//                    status and FIFO level
// The chain follows the published eMiCES design. In the scanner this logic is spread over
// the analog board FPGA and the digital board; here it is one block that
// talks to the processor (cpu_* register bus and the last_ready flag), to the 1394a
// controller FIFO (ti_*) and to the coincidence controller (event_trig,
// accept, sync_clk). MODULE_ID is written into every packet.
module node_fpga
  import emices_pkg::*;
#(
  parameter logic [5:0]  MODULE_ID      = 6'd0,
  parameter int unsigned TAC_W          = 10,
  parameter int unsigned N_SAMPLES      = 16,
  parameter int unsigned ACCEPT_TIMEOUT = 8,
  parameter int unsigned SINGLES_PERIOD = 625000,
  parameter int unsigned FIFO_DEPTH     = 64,
  parameter int unsigned BLOCK_BYTES    = BLOCK_PAYLOAD
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [4:0]       cpu_addr,
  input  logic             cpu_wr,
  input  logic [7:0]       cpu_wdata,
  output logic [7:0]       cpu_rdata,
  input  logic             sync_clk,
  input  logic [N_PMT-1:0] trig,
  input  logic [TAC_W-1:0] tac [N_PMT],
  input  adc_t             adc [N_PMT][N_CHAN],
  output logic             event_trig,
  input  logic             accept,
  output logic             ti_wr,
  output logic [31:0]      ti_data,
  input  logic             ti_full,
  output logic             last_ready,
  output logic             running,
  output logic             block_done,
  output logic             ev_cleared,
  output logic             ev_dropped,
  output logic             ev_stored
);
  logic [TS_W-1:0]        ts;
  logic [7:0]             singles [N_PMT];
  event_t                 ev;
  logic                   ev_full, ev_empty, ev_rd;
  logic [EVENT_BITS-1:0]  fifo_head;
  logic                   start, stop, send_last, armed;
  logic [$clog2(FIFO_DEPTH):0] fifo_count;

  node_regs u_regs (
    .clk, .rst_n, .cpu_addr, .cpu_wr, .cpu_wdata, .cpu_rdata,
    .start, .stop, .send_last,
    .running, .armed, .last_ready, .fifo_full (ev_full), .fifo_empty (ev_empty),
    .fifo_level (8'(fifo_count)), .dropped (ev_dropped)
  );

  time_scaler #(.TS_W(TS_W)) u_ts (
    .clk, .rst_n, .start, .stop, .sync_clk,
    .armed, .running, .count (ts)
  );

  for (genvar p = 0; p < N_PMT; p++) begin : g_singles
    singles_scaler #(.INTERVAL(SINGLES_PERIOD)) u_singles (
      .clk, .rst_n, .run (running), .trig (trig[p]), .rate (singles[p])
    );
  end

  event_capture #(.TAC_W(TAC_W), .N_SAMPLES(N_SAMPLES), .ACCEPT_TIMEOUT(ACCEPT_TIMEOUT)) u_cap (
    .clk, .rst_n, .running, .timestamp (ts), .module_id (MODULE_ID),
    .trig, .tac, .adc, .singles, .event_trig, .accept,
    .ev_full, .ev_valid (ev_stored), .ev_data (ev),
    .busy (), .cleared (ev_cleared), .dropped (ev_dropped)
  );

  sync_fifo #(.WIDTH(EVENT_BITS), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .wr_en (ev_stored), .din (ev), .rd_en (ev_rd),
    .dout (fifo_head), .full (ev_full), .empty (ev_empty), .count (fifo_count)
  );

  block_loader #(.BLOCK_BYTES(BLOCK_BYTES), .HOLD_BYTES(BLOCK_HOLD)) u_load (
    .clk, .rst_n, .ev_empty, .ev_data (fifo_head), .ev_rd,
    .ti_wr, .ti_data, .ti_full, .last_ready, .send_last, .block_done
  );
endmodule
