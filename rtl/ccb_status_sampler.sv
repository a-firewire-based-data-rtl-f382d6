// ccb_status_sampler - periodic status record of the coincidence controller.
//
// Besides coincidence decisions, the coincidence board reports to the host
// the gantry position, the state of up to four gating inputs and the time
// stamp at which they were captured, typically every 10 ms. This block takes
// that snapshot every `period` master cycles (625000 = 10 ms at 62.5 MHz,
// set at run time through the controller's registers; 0 turns it off)
// while the run is on and presents it with a one-cycle valid pulse to the
// processor that forwards it. The snapshot content and period are the
// published eMiCES design's; the 16-bit position and sampling the gate inputs as plain
// synchronous levels are this design's choices.
//
// Timing: with run rising before cycle 0, valid pulses in cycles period,
// 2*period, ... holding the inputs of cycle period-1, 2*period-1, ...;
// the record stays until the next one.
module ccb_status_sampler #(
  parameter int unsigned PERIOD_W = 24,
  parameter int unsigned POS_W  = 16,
  parameter int unsigned N_GATE = 4,
  parameter int unsigned TS_W   = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  input  logic [PERIOD_W-1:0] period,
  input  logic [POS_W-1:0]  gantry_pos,
  input  logic [N_GATE-1:0] gate,
  input  logic [TS_W-1:0]   timestamp,
  output logic              valid,
  output logic [POS_W-1:0]  rec_pos,
  output logic [N_GATE-1:0] rec_gate,
  output logic [TS_W-1:0]   rec_ts
);
  logic [PERIOD_W-1:0] tmr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tmr      <= '0;
      valid    <= 1'b0;
      rec_pos  <= '0;
      rec_gate <= '0;
      rec_ts   <= '0;
    end else begin
      valid <= 1'b0;
      if (!run || period == '0) begin
        tmr <= '0;
      end else if (tmr >= period - 1'b1) begin
        tmr      <= '0;
        valid    <= 1'b1;
        rec_pos  <= gantry_pos;
        rec_gate <= gate;
        rec_ts   <= timestamp;
      end else begin
        tmr <= tmr + 1'b1;
      end
    end
  end
endmodule
