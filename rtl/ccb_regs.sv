// ccb_regs - processor registers of the coincidence controller FPGA.
//
// The board's processor reaches the FPGA's control and data registers over
// its 8-bit I/O bus. Through them it starts and stops the run, changes the
// coincidence window, the angular acceptance and the status period at run
// time, and collects the 10 ms status records for the host. That such
// registers exist and what they control follows the published eMiCES
// design; the register map, the 8-bit width, the little-endian byte order
// and the bus timing are this design's choices.
//
//   addr  access  content
//   0x00  W       bit0 start (arm, run begins on next sync edge),
//                 bit1 stop, bit2 clear record-pending     (pulses)
//   0x01  R       bit0 running, bit1 armed, bit2 record pending
//   0x02  RW      coincidence window, cycles of 16 ns   (reset WINDOW_CYC)
//   0x03  RW      minimum cassette separation          (reset MIN_SEP)
//   0x04-06 RW    status period in cycles, LSB first   (reset STATUS_PERIOD)
//   0x08-09 R     record: gantry position, LSB first
//   0x0A  R       record: gating inputs
//   0x0C-0F R     record: time stamp, LSB first
//
// Bus timing: cpu_addr/cpu_wdata are sampled with cpu_wr at a clock edge
// (the bus is assumed already synchronized to the master clock); cpu_rdata
// follows cpu_addr combinationally. Unused addresses read 0.
module ccb_regs #(
  parameter int unsigned WINDOW_CYC    = 2,
  parameter int unsigned MIN_SEP       = 6,
  parameter int unsigned STATUS_PERIOD = 625000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  cpu_addr,
  input  logic        cpu_wr,
  input  logic [7:0]  cpu_wdata,
  output logic [7:0]  cpu_rdata,
  output logic        start,
  output logic        stop,
  output logic [7:0]  win_cyc,
  output logic [7:0]  min_sep,
  output logic [23:0] period,
  input  logic        running,
  input  logic        armed,
  input  logic        rec_valid,
  input  logic [15:0] rec_pos,
  input  logic [3:0]  rec_gate,
  input  logic [31:0] rec_ts
);
  logic pending;
  logic wr_ctrl;

  assign wr_ctrl = cpu_wr && (cpu_addr == 5'h00);
  assign start   = wr_ctrl && cpu_wdata[0];
  assign stop    = wr_ctrl && cpu_wdata[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_cyc <= 8'(WINDOW_CYC);
      min_sep <= 8'(MIN_SEP);
      period  <= 24'(STATUS_PERIOD);
      pending <= 1'b0;
    end else begin
      if (rec_valid)                      pending <= 1'b1;
      else if (wr_ctrl && cpu_wdata[2])   pending <= 1'b0;
      if (cpu_wr) begin
        unique case (cpu_addr)
          5'h02:   win_cyc        <= cpu_wdata;
          5'h03:   min_sep        <= cpu_wdata;
          5'h04:   period[7:0]    <= cpu_wdata;
          5'h05:   period[15:8]   <= cpu_wdata;
          5'h06:   period[23:16]  <= cpu_wdata;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (cpu_addr)
      5'h01:   cpu_rdata = {5'b0, pending, armed, running};
      5'h02:   cpu_rdata = win_cyc;
      5'h03:   cpu_rdata = min_sep;
      5'h04:   cpu_rdata = period[7:0];
      5'h05:   cpu_rdata = period[15:8];
      5'h06:   cpu_rdata = period[23:16];
      5'h08:   cpu_rdata = rec_pos[7:0];
      5'h09:   cpu_rdata = rec_pos[15:8];
      5'h0A:   cpu_rdata = {4'b0, rec_gate};
      5'h0C:   cpu_rdata = rec_ts[7:0];
      5'h0D:   cpu_rdata = rec_ts[15:8];
      5'h0E:   cpu_rdata = rec_ts[23:16];
      5'h0F:   cpu_rdata = rec_ts[31:24];
      default: cpu_rdata = 8'h00;
    endcase
  end
endmodule
