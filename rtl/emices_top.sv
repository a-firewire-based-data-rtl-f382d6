// emices_top - digital core of the eMiCES PET data acquisition system.
//
// The MiCES small-animal scanner has 72 detector modules read out as 36
// Firewire nodes of two PMTs each. Every node FPGA time-stamps and
// integrates its PMT pulses and reports each event on a trigger line to the
// coincidence controller; only events that the controller accepts (partner
// within 40 ns in the opposite detector fan) are packed into 16-byte
// packets and streamed, 126 per 2016-byte block, into the node's 1394a
// controller FIFO. The coincidence controller also supplies the sync clock
// on which all time scalars start and a 10 ms status record.
//
// This top holds the coincidence controller FPGA and N_NODES node FPGAs and
// wires trigger, accept and sync clock between them; node n writes module
// ID n into its packets. Processors, Firewire controllers, ASICs and ADCs
// are outside: their signals are ports (each processor's 8-bit register bus
// and each node's last_ready flag, the controller FIFO write port, ASIC
// triggers and TAC values, ADC samples). All logic runs on the 62.5 MHz master clock.
module emices_top
  import emices_pkg::*;
#(
  parameter int unsigned N_NODES            = 36,
  parameter int unsigned NODES_PER_CASSETTE = 2,
  parameter int unsigned TAC_W              = 10,
  parameter int unsigned N_SAMPLES          = 16,
  parameter int unsigned WINDOW_CYC         = 2,
  parameter int unsigned MIN_SEP            = 6,
  parameter int unsigned STATUS_PERIOD      = 625000,
  parameter int unsigned SINGLES_PERIOD     = 625000,
  parameter int unsigned FIFO_DEPTH         = 64,
  parameter int unsigned BLOCK_BYTES        = BLOCK_PAYLOAD
) (
  input  logic               clk,
  input  logic               rst_n,
  // coincidence controller processor
  input  logic [4:0]         ccb_cpu_addr,
  input  logic               ccb_cpu_wr,
  input  logic [7:0]         ccb_cpu_wdata,
  output logic [7:0]         ccb_cpu_rdata,
  output logic               ccb_running,
  output logic               sync_clk,
  input  logic [15:0]        gantry_pos,
  input  logic [3:0]         gate,
  output logic               status_valid,
  output logic [15:0]        status_pos,
  output logic [3:0]         status_gate,
  output logic [TS_W-1:0]    status_ts,
  output logic               coinc,
  // node processors
  input  logic [4:0]         cpu_addr  [N_NODES],
  input  logic [N_NODES-1:0] cpu_wr,
  input  logic [7:0]         cpu_wdata [N_NODES],
  output logic [7:0]         cpu_rdata [N_NODES],
  output logic [N_NODES-1:0] node_running,
  output logic [N_NODES-1:0] last_ready,
  // ASICs and ADCs
  input  logic [N_PMT-1:0]   pmt_trig [N_NODES],
  input  logic [TAC_W-1:0]   pmt_tac  [N_NODES][N_PMT],
  input  adc_t               pmt_adc  [N_NODES][N_PMT][N_CHAN],
  // 1394a controller FIFOs
  output logic [N_NODES-1:0] ti_wr,
  output logic [31:0]        ti_data  [N_NODES],
  input  logic [N_NODES-1:0] ti_full,
  // event bus and node status
  output logic [N_NODES-1:0] event_trig,
  output logic [N_NODES-1:0] accept,
  output logic [N_NODES-1:0] block_done,
  output logic [N_NODES-1:0] ev_cleared,
  output logic [N_NODES-1:0] ev_dropped,
  output logic [N_NODES-1:0] ev_stored
);
  coincidence_controller #(
    .N_NODES(N_NODES), .NODES_PER_CASSETTE(NODES_PER_CASSETTE),
    .WINDOW_CYC(WINDOW_CYC), .MIN_SEP(MIN_SEP),
    .STATUS_PERIOD(STATUS_PERIOD), .POS_W(16), .N_GATE(4)
  ) u_ccb (
    .clk, .rst_n,
    .cpu_addr (ccb_cpu_addr), .cpu_wr (ccb_cpu_wr), .cpu_wdata (ccb_cpu_wdata), .cpu_rdata (ccb_cpu_rdata),
    .sync_clk, .running (ccb_running), .timestamp (),
    .trig (event_trig), .accept, .coinc,
    .gantry_pos, .gate,
    .status_valid, .status_pos, .status_gate, .status_ts
  );

  for (genvar n = 0; n < N_NODES; n++) begin : g_node
    node_fpga #(
      .MODULE_ID(6'(n)), .TAC_W(TAC_W), .N_SAMPLES(N_SAMPLES),
      .SINGLES_PERIOD(SINGLES_PERIOD), .FIFO_DEPTH(FIFO_DEPTH), .BLOCK_BYTES(BLOCK_BYTES)
    ) u_node (
      .clk, .rst_n,
      .cpu_addr (cpu_addr[n]), .cpu_wr (cpu_wr[n]), .cpu_wdata (cpu_wdata[n]), .cpu_rdata (cpu_rdata[n]),
      .sync_clk,
      .trig (pmt_trig[n]), .tac (pmt_tac[n]), .adc (pmt_adc[n]),
      .event_trig (event_trig[n]), .accept (accept[n]),
      .ti_wr (ti_wr[n]), .ti_data (ti_data[n]), .ti_full (ti_full[n]),
      .last_ready (last_ready[n]),
      .running (node_running[n]), .block_done (block_done[n]),
      .ev_cleared (ev_cleared[n]), .ev_dropped (ev_dropped[n]), .ev_stored (ev_stored[n])
    );
  end
endmodule
