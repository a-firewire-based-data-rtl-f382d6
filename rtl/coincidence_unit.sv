// coincidence_unit - coarse coincidence and angular acceptance.
//
// Every node raises a one-cycle event trigger when one of its PMTs fires.
// Two triggers from different nodes form a coincidence when they lie within
// the coarse window (40 ns, i.e. at most win_cyc = 2 cycles of 16 ns apart)
// and the two nodes' detectors lie inside the angular acceptance window;
// both nodes then receive an accept pulse and keep their event. That rule,
// and that both windows can be changed at run time, are the published
// eMiCES design's. The acceptance geometry is this design's choice: nodes
// sit on a ring of N_NODES/NODES_PER_CASSETTE cassettes, node n in cassette
// n/NODES_PER_CASSETTE, and a pair is accepted when the circular distance
// between the cassettes is at least min_sep (the opposite fan). A trigger
// may pair with several partners inside its window; all are accepted.
// win_cyc (0 .. WINDOW_MAX) and min_sep come from the controller's
// registers and should only change while no triggers arrive.
//
// How: each node keeps a flag and an age (cycles since its last trigger,
// 1..win_cyc). In each cycle a new trigger is compared with the new
// triggers of the same cycle and with every flagged trigger. accept is
// registered: it pulses in the cycle after the later trigger of a pair.
module coincidence_unit #(
  parameter int unsigned N_NODES            = 36,
  parameter int unsigned NODES_PER_CASSETTE = 2,
  parameter int unsigned WINDOW_MAX         = 15
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [$clog2(WINDOW_MAX+2)-1:0] win_cyc,
  input  logic [$clog2(N_NODES/NODES_PER_CASSETTE+1)-1:0] min_sep,
  input  logic [N_NODES-1:0] trig,
  output logic [N_NODES-1:0] accept,
  output logic               coinc
);
  localparam int unsigned N_CASS = N_NODES / NODES_PER_CASSETTE;
  localparam int unsigned AW     = $clog2(WINDOW_MAX + 2);
  localparam int unsigned SW     = $clog2(N_CASS + 1);

  // Distance around the ring between the cassettes of nodes a and b.
  function automatic logic [SW-1:0] ring_dist(int unsigned a, int unsigned b);
    int unsigned ca, cb, d;
    ca = a / NODES_PER_CASSETTE;
    cb = b / NODES_PER_CASSETTE;
    d  = (ca > cb) ? ca - cb : cb - ca;
    if (N_CASS - d < d) d = N_CASS - d;
    return SW'(d);
  endfunction

  logic [N_NODES-1:0] hit;
  logic [AW-1:0]      age [N_NODES];
  logic [N_NODES-1:0] acc_next;
  logic [N_NODES-1:0] fan [N_NODES];

  for (genvar i = 0; i < N_NODES; i++) begin : g_fan_i
    for (genvar j = 0; j < N_NODES; j++) begin : g_fan_j
      if (i == j) begin : g_self
        assign fan[i][j] = 1'b0;
      end else begin : g_pair
        assign fan[i][j] = (ring_dist(i, j) >= min_sep);
      end
    end
  end

  // Node i is accepted if it has a new trigger and a partner that is new or
  // still inside its window, or it is inside its window and a partner is new.
  always_comb begin
    for (int i = 0; i < N_NODES; i++) begin
      acc_next[i] = |(fan[i] & ((trig[i] ? (trig | hit) : '0) | (hit[i] ? trig : '0)));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hit    <= '0;
      accept <= '0;
      coinc  <= 1'b0;
      for (int i = 0; i < N_NODES; i++) age[i] <= '0;
    end else begin
      accept <= acc_next;
      coinc  <= |acc_next;
      for (int i = 0; i < N_NODES; i++) begin
        if (trig[i]) begin
          hit[i] <= (win_cyc != '0);
          age[i] <= AW'(1);
        end else if (hit[i]) begin
          if (age[i] >= win_cyc) hit[i] <= 1'b0;
          else                           age[i] <= age[i] + 1'b1;
        end
      end
    end
  end
endmodule
