// node_regs - processor registers of a node FPGA.
//
// The node's processor talks to its FPGA over an 8-bit I/O bus. It passes
// on the start and stop commands it receives on the command bus, and it
// answers the "last 4 bytes ready" flag with "send the last 4 bytes" once it
// has written a block header into the 1394a controller. The flag is also
// a pin (last_ready) so the processor can poll or take it as an
// interrupt. The commands and the flag follow the published eMiCES design;
// the register map, bus width and timing are this design's choices.
//
//   addr  access  content
//   0x00  W       bit0 start, bit1 stop, bit2 send last 4 bytes (pulses)
//   0x01  R       bit0 running, bit1 armed, bit2 last 4 bytes ready,
//                 bit3 event FIFO full, bit4 event FIFO empty
//   0x02  R       event FIFO fill level
//   0x03  R       accepted events dropped on a full FIFO (saturating)
//
// Bus timing: cpu_addr/cpu_wdata are sampled with cpu_wr at a clock edge
// (the bus is assumed already synchronized to the master clock); the
// command pulses are combinational in that cycle. cpu_rdata follows
// cpu_addr combinationally; unused addresses read 0.
module node_regs (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] cpu_addr,
  input  logic       cpu_wr,
  input  logic [7:0] cpu_wdata,
  output logic [7:0] cpu_rdata,
  output logic       start,
  output logic       stop,
  output logic       send_last,
  input  logic       running,
  input  logic       armed,
  input  logic       last_ready,
  input  logic       fifo_full,
  input  logic       fifo_empty,
  input  logic [7:0] fifo_level,
  input  logic       dropped
);
  logic       wr_ctrl;
  logic [7:0] n_drop;

  assign wr_ctrl   = cpu_wr && (cpu_addr == 5'h00);
  assign start     = wr_ctrl && cpu_wdata[0];
  assign stop      = wr_ctrl && cpu_wdata[1];
  assign send_last = wr_ctrl && cpu_wdata[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        n_drop <= '0;
    else if (start)                    n_drop <= '0;
    else if (dropped && n_drop != '1)  n_drop <= n_drop + 1'b1;
  end

  always_comb begin
    unique case (cpu_addr)
      5'h01:   cpu_rdata = {3'b0, fifo_empty, fifo_full, last_ready, armed, running};
      5'h02:   cpu_rdata = fifo_level;
      5'h03:   cpu_rdata = n_drop;
      default: cpu_rdata = 8'h00;
    endcase
  end
endmodule
