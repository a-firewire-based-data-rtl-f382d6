// time_scaler - run control and event time scalar of one FPGA.
//
// Every FPGA keeps a 32-bit count of master clock cycles (16 ns each) that is
// latched as the time stamp of each event. Start commands reach the FPGAs at
// slightly different times (they travel over a daisy-chained command bus and
// through processors that do not run on the master clock), so a start only
// arms the scalar: the count is cleared and starts on the next rising edge of
// the sync clock, which all FPGAs see at the same moment. That is the
// published eMiCES design's mechanism. A stop pulse halts counting at once and disarms; what
// stop does is not described and is this design's choice.
//
// Timing: with start seen in cycle t and the sync clock rising (sampled 0 in
// the cycle before, 1 now) in cycle s > t, count is 0 after the clock edge
// ending cycle s and increments once per cycle after that.
module time_scaler #(
  parameter int unsigned TS_W = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,     // pulse: arm
  input  logic            stop,      // pulse: halt
  input  logic            sync_clk,  // sync clock, master-clock synchronous
  output logic            armed,
  output logic            running,
  output logic [TS_W-1:0] count
);
  logic sync_q;
  logic sync_rise;

  assign sync_rise = sync_clk && !sync_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q  <= 1'b0;
      armed   <= 1'b0;
      running <= 1'b0;
      count   <= '0;
    end else begin
      sync_q <= sync_clk;
      if (stop) begin
        armed   <= 1'b0;
        running <= 1'b0;
      end else if (start) begin
        armed   <= 1'b1;
        running <= 1'b0;
      end else if (armed && sync_rise) begin
        armed   <= 1'b0;
        running <= 1'b1;
        count   <= '0;
      end else if (running) begin
        count   <= count + 1'b1;
      end
    end
  end
endmodule
