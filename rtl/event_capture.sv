// event_capture - per-node event handling up to the coincidence decision.
//
// A node serves two PMTs. When a PMT's timing pickoff fires while the run is
// on and no event is pending, the block
//   * latches the run time clock (the time stamp) and the 8 MSBs of that
//     PMT's TAC value (the fine time), and remembers which PMT fired;
//   * starts four pulse integrators on that PMT's X-, X+, Y-, Y+ samples;
//   * raises its event trigger to the coincidence controller for one cycle.
// If the coincidence controller answers with an accept pulse within
// ACCEPT_TIMEOUT cycles, the 16-byte event packet is assembled when the
// integration ends and written to the event FIFO. Without an accept the
// event is cleared. This sequence follows the published eMiCES design. Its own choices:
// one pending event per node (later triggers are not captured but still
// count as singles), PMT 0 wins a same-cycle tie, an accepted event that
// meets a full FIFO is dropped and flagged. The TAC input is TAC_W bits
// (10 by default, the width of the ASIC's timing data in the published
// block diagram); the packet keeps its 8 most significant bits.
//
// Timing: trigger in cycle t -> event_trig high in cycle t+1; accept must
// arrive in cycles t+1 .. t+ACCEPT_TIMEOUT; the integrated samples are those
// of cycles t .. t+N_SAMPLES-1; ev_valid pulses in cycle t+N_SAMPLES+1 (or
// one cycle after a late accept), cleared pulses in cycle t+ACCEPT_TIMEOUT+1.
module event_capture
  import emices_pkg::*;
#(
  parameter int unsigned TAC_W          = 10,
  parameter int unsigned N_SAMPLES      = 16,
  parameter int unsigned ACCEPT_TIMEOUT = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              running,
  input  logic [TS_W-1:0]   timestamp,
  input  logic [5:0]        module_id,
  input  logic [N_PMT-1:0]  trig,
  input  logic [TAC_W-1:0]  tac [N_PMT],
  input  adc_t              adc [N_PMT][N_CHAN],
  input  logic [7:0]        singles [N_PMT],
  output logic              event_trig,
  input  logic              accept,
  input  logic              ev_full,
  output logic              ev_valid,
  output event_t            ev_data,
  output logic              busy,
  output logic              cleared,
  output logic              dropped
);
  typedef enum logic { S_IDLE, S_WAIT } state_t;

  localparam int unsigned TW = $clog2(ACCEPT_TIMEOUT + 1);

  state_t          state;
  logic            pmt_q;
  logic [TS_W-1:0] ts_q;
  logic [7:0]      tac_q;
  logic [TW-1:0]   tmr;
  logic            acc_q;
  logic            int_done_q;

  logic            capture;
  logic            pmt_new;
  logic            pmt_sel;
  logic            int_start;
  logic [N_CHAN-1:0] int_done;
  sig_t            sig [N_CHAN];
  logic            acc_now, done_now;

  assign capture   = (state == S_IDLE) && running && (trig != '0);
  assign pmt_new   = !trig[0];
  assign pmt_sel   = (state == S_IDLE) ? pmt_new : pmt_q;
  assign int_start = capture;
  assign busy      = (state != S_IDLE);

  for (genvar c = 0; c < N_CHAN; c++) begin : g_int
    pulse_integrator #(.ADC_W(ADC_W), .N_SAMPLES(N_SAMPLES), .OUT_W(SIG_W)) u_int (
      .clk, .rst_n,
      .start  (int_start),
      .sample (adc[pmt_sel][c]),
      .busy   (),
      .done   (int_done[c]),
      .result (sig[c])
    );
  end

  assign acc_now  = acc_q || accept;
  assign done_now = int_done_q || int_done[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      pmt_q      <= 1'b0;
      ts_q       <= '0;
      tac_q      <= '0;
      tmr        <= '0;
      acc_q      <= 1'b0;
      int_done_q <= 1'b0;
      event_trig <= 1'b0;
      ev_valid   <= 1'b0;
      ev_data    <= '0;
      cleared    <= 1'b0;
      dropped    <= 1'b0;
    end else begin
      event_trig <= 1'b0;
      ev_valid   <= 1'b0;
      cleared    <= 1'b0;
      dropped    <= 1'b0;
      unique case (state)
        S_IDLE: if (capture) begin
          state      <= S_WAIT;
          pmt_q      <= pmt_new;
          ts_q       <= timestamp;
          tac_q      <= tac[pmt_new][TAC_W-1 -: 8];
          tmr        <= '0;
          acc_q      <= 1'b0;
          int_done_q <= 1'b0;
          event_trig <= 1'b1;
        end
        S_WAIT: begin
          acc_q      <= acc_now;
          int_done_q <= done_now;
          if (tmr != TW'(ACCEPT_TIMEOUT)) tmr <= tmr + 1'b1;
          if (acc_now && done_now) begin
            state <= S_IDLE;
            if (ev_full) begin
              dropped <= 1'b1;
            end else begin
              ev_valid            <= 1'b1;
              ev_data.id          <= '{zero: 1'b0, pmt_id: pmt_q, module_id: module_id};
              ev_data.timestamp   <= ts_q;
              ev_data.tac         <= tac_q;
              ev_data.x_minus     <= 16'(sig[0]);
              ev_data.x_plus      <= 16'(sig[1]);
              ev_data.y_minus     <= 16'(sig[2]);
              ev_data.y_plus      <= 16'(sig[3]);
              ev_data.singles0    <= singles[0];
              ev_data.singles1    <= singles[1];
            end
          end else if (!acc_now && tmr == TW'(ACCEPT_TIMEOUT - 1)) begin
            state   <= S_IDLE;
            cleared <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The accept bus must only answer an outstanding trigger.
  a_accept_only_when_pending: assert property (@(posedge clk) disable iff (!rst_n)
    accept |-> (state == S_WAIT));
endmodule
