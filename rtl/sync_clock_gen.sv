// sync_clock_gen - sync clock of the coincidence controller.
//
// The coincidence board distributes, next to the 62.5 MHz master clock, a
// sync clock at 1/DIV of the master rate (DIV = 8 in the MiCES scanner). Node
// FPGAs start their event time scalars on its next rising edge after a start
// command, so all time stamps share one origin. A counter of DIV states
// drives the output high for the first DIV/2 states (50 % duty, this
// design's choice). The output is a register in the master-clock domain and
// rises one cycle after reset is released, then every DIV cycles.
module sync_clock_gen #(
  parameter int unsigned DIV = 8
) (
  input  logic clk,
  input  logic rst_n,
  output logic sync_clk
);
  localparam int unsigned CW = (DIV > 2) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      sync_clk <= 1'b0;
    end else begin
      cnt      <= (cnt == CW'(DIV-1)) ? '0 : cnt + 1'b1;
      sync_clk <= (cnt < CW'(DIV/2));
    end
  end
endmodule
