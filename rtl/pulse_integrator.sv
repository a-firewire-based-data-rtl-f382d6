// pulse_integrator - integrates one digitized position signal.
//
// The node FPGA integrates each of the four PMT position signals (X-, X+,
// Y-, Y+) after a trigger. The published design gives only that function; this block
// is the simplest form of it: starting with the sample present in the cycle
// where start is high, N_SAMPLES consecutive ADC samples are summed and the
// OUT_W most significant bits of the (ADC_W + log2 N_SAMPLES)-bit sum are
// returned. The integration length and the absence of baseline subtraction
// are this design's choices.
//
// Timing: start in cycle t sums the samples of cycles t .. t+N_SAMPLES-1;
// done pulses for one cycle in cycle t+N_SAMPLES with result valid then and
// held until the next start. A start while busy restarts the integration.
module pulse_integrator #(
  parameter int unsigned ADC_W     = 10,
  parameter int unsigned N_SAMPLES = 16,
  parameter int unsigned OUT_W     = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [ADC_W-1:0] sample,
  output logic             busy,
  output logic             done,
  output logic [OUT_W-1:0] result
);
  localparam int unsigned ACC_W = ADC_W + $clog2(N_SAMPLES);
  localparam int unsigned NW    = $clog2(N_SAMPLES + 1);

  logic [ACC_W-1:0] acc;
  logic [NW-1:0]    left;     // samples still to add after this one

  // Top OUT_W bits of the sum, or the sum zero-extended if it is narrower.
  function automatic logic [OUT_W-1:0] scale(logic [ACC_W-1:0] a);
    if (ACC_W >= OUT_W) return OUT_W'(a >> (ACC_W - OUT_W));
    else                return OUT_W'(a);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc    <= '0;
      left   <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
      result <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        acc  <= ACC_W'(sample);
        left <= NW'(N_SAMPLES - 1);
        busy <= (N_SAMPLES > 1);
        if (N_SAMPLES == 1) begin
          done   <= 1'b1;
          result <= scale(ACC_W'(sample));
        end
      end else if (busy) begin
        acc  <= acc + ACC_W'(sample);
        left <= left - 1'b1;
        if (left == NW'(1)) begin
          busy   <= 1'b0;
          done   <= 1'b1;
          result <= scale(acc + ACC_W'(sample));
        end
      end
    end
  end
endmodule
