// coincidence_controller - FPGA logic of the coincidence controller board.
//
// The coincidence board sits at the centre of the scanner's event bus. Its
// FPGA
//   * divides the master clock by 8 into the sync clock that all node FPGAs
//     use to start their time scalars together (sync_clock_gen);
//   * keeps its own time scalar, started the same way by its processor;
//   * pairs the nodes' event triggers in the 40 ns window and the angular
//     acceptance window and returns accept pulses (coincidence_unit);
//   * every 10 ms captures gantry position, gating inputs and time stamp for
//     the host (ccb_status_sampler);
//   * gives the board's processor registers to start and stop the run, to
//     change window, acceptance and status period at run time, and to read
//     the status records (ccb_regs).
// The partition follows the published description of the board. Command
// bus, serial links and the processor itself are outside this block. The
// parameters WINDOW_CYC, MIN_SEP and STATUS_PERIOD are the reset values of
// the registers.
module coincidence_controller
  import emices_pkg::*;
#(
  parameter int unsigned N_NODES            = 36,
  parameter int unsigned NODES_PER_CASSETTE = 2,
  parameter int unsigned WINDOW_CYC         = 2,
  parameter int unsigned WINDOW_MAX         = 15,
  parameter int unsigned MIN_SEP            = 6,
  parameter int unsigned SYNC_DIV           = 8,
  parameter int unsigned STATUS_PERIOD      = 625000,
  parameter int unsigned POS_W              = 16,
  parameter int unsigned N_GATE             = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [4:0]         cpu_addr,
  input  logic               cpu_wr,
  input  logic [7:0]         cpu_wdata,
  output logic [7:0]         cpu_rdata,
  output logic               sync_clk,
  output logic               running,
  output logic [TS_W-1:0]    timestamp,
  input  logic [N_NODES-1:0] trig,
  output logic [N_NODES-1:0] accept,
  output logic               coinc,
  input  logic [POS_W-1:0]   gantry_pos,
  input  logic [N_GATE-1:0]  gate,
  output logic               status_valid,
  output logic [POS_W-1:0]   status_pos,
  output logic [N_GATE-1:0]  status_gate,
  output logic [TS_W-1:0]    status_ts
);
  localparam int unsigned AW = $clog2(WINDOW_MAX + 2);
  localparam int unsigned SW = $clog2(N_NODES / NODES_PER_CASSETTE + 1);

  logic        start, stop, armed;
  logic [7:0]  win_cyc, min_sep;
  logic [23:0] period;

  ccb_regs #(.WINDOW_CYC(WINDOW_CYC), .MIN_SEP(MIN_SEP), .STATUS_PERIOD(STATUS_PERIOD)) u_regs (
    .clk, .rst_n, .cpu_addr, .cpu_wr, .cpu_wdata, .cpu_rdata,
    .start, .stop, .win_cyc, .min_sep, .period,
    .running, .armed, .rec_valid (status_valid),
    .rec_pos (16'(status_pos)), .rec_gate (4'(status_gate)), .rec_ts (status_ts)
  );

  sync_clock_gen #(.DIV(SYNC_DIV)) u_sync (.clk, .rst_n, .sync_clk);

  time_scaler #(.TS_W(TS_W)) u_ts (
    .clk, .rst_n, .start, .stop, .sync_clk,
    .armed, .running, .count (timestamp)
  );

  // Register values beyond what the logic can hold are clipped.
  coincidence_unit #(
    .N_NODES(N_NODES), .NODES_PER_CASSETTE(NODES_PER_CASSETTE), .WINDOW_MAX(WINDOW_MAX)
  ) u_coinc (
    .clk, .rst_n,
    .win_cyc ((win_cyc > 8'(WINDOW_MAX)) ? AW'(WINDOW_MAX) : AW'(win_cyc)),
    .min_sep ((min_sep > 8'((1 << SW) - 1)) ? SW'((1 << SW) - 1) : SW'(min_sep)),
    .trig, .accept, .coinc
  );

  ccb_status_sampler #(.PERIOD_W(24), .POS_W(POS_W), .N_GATE(N_GATE), .TS_W(TS_W)) u_status (
    .clk, .rst_n, .run (running), .period, .gantry_pos, .gate, .timestamp,
    .valid (status_valid), .rec_pos (status_pos), .rec_gate (status_gate), .rec_ts (status_ts)
  );
endmodule
