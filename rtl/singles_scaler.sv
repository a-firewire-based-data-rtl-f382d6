// singles_scaler - trigger rate scalar of one PMT.
//
// Each event packet carries, per PMT, an 8-bit singles rate "scaled by 256".
// This block counts the PMT's triggers while the run is on over a fixed
// interval of INTERVAL master cycles; at the end of each interval it
// publishes count / 256, saturated to 255, and starts a new interval. The
// interval length (10 ms by default) is this design's choice; the scaling
// and field width follow the packet definition.
//
// Timing: rate changes one cycle after the last cycle of an interval and
// holds for the whole next interval. Leaving run clears the count and the
// interval timer (rate keeps its last value).
module singles_scaler #(
  parameter int unsigned INTERVAL = 625000,
  parameter int unsigned CNT_W    = 24
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       run,
  input  logic       trig,
  output logic [7:0] rate
);
  localparam int unsigned TW = $clog2(INTERVAL);

  logic [TW-1:0]    tmr;
  logic [CNT_W-1:0] cnt;
  logic [CNT_W-1:0] cnt_final;
  logic [CNT_W-1:0] scaled;

  assign cnt_final = (trig && cnt != '1) ? cnt + 1'b1 : cnt;
  assign scaled    = cnt_final >> 8;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tmr  <= '0;
      cnt  <= '0;
      rate <= '0;
    end else if (!run) begin
      tmr <= '0;
      cnt <= '0;
    end else if (tmr == TW'(INTERVAL - 1)) begin
      tmr  <= '0;
      cnt  <= '0;
      rate <= (scaled > CNT_W'(255)) ? 8'd255 : scaled[7:0];
    end else begin
      tmr <= tmr + 1'b1;
      cnt <= cnt_final;
    end
  end
endmodule
