// tb_ccb_status_sampler - with a short period, checks that a record appears
// exactly every `period` cycles while running (100, then 37 after a change
// at run time, and none with period 0), holds the gantry position, gate
// levels and time stamp of the cycle before, and that none appears while
// stopped.
module tb_ccb_status_sampler;
  int P = 100;
  logic [23:0] period;
  assign period = 24'(P);
  logic clk = 0, rst_n = 0, run = 0;
  logic [15:0] gantry_pos = 0;
  logic [3:0] gate = 0;
  logic [31:0] timestamp = 0;
  logic valid;
  logic [15:0] rec_pos;
  logic [3:0] rec_gate;
  logic [31:0] rec_ts;
  int checks = 0, failures = 0, nrec = 0, cyc = 0;
  logic [15:0] pos_q; logic [3:0] gate_q; logic [31:0] ts_q;

  ccb_status_sampler #(.PERIOD_W(24), .POS_W(16), .N_GATE(4), .TS_W(32)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  always @(posedge clk) begin
    pos_q <= gantry_pos; gate_q <= gate; ts_q <= timestamp;
    gantry_pos <= 16'($urandom); gate <= 4'($urandom); timestamp <= timestamp + 1;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3 * P) begin @(negedge clk); check(!valid, "no record while stopped"); end
    @(negedge clk) run = 1;
    for (cyc = 1; cyc <= 10 * P; cyc++) begin
      @(negedge clk);
      check(valid == (cyc % P == 0), "record period");
      if (valid) begin
        nrec++;
        check(rec_pos == pos_q && rec_gate == gate_q && rec_ts == ts_q, "record content");
      end
    end
    check(nrec == 10, "ten records");
    // change the period: restart the run so the timer starts from 0
    @(negedge clk) run = 0; P = 37;
    @(negedge clk) run = 1;
    nrec = 0;
    for (cyc = 1; cyc <= 10 * P; cyc++) begin
      @(negedge clk);
      check(valid == (cyc % P == 0), "record period after change");
      if (valid) nrec++;
    end
    check(nrec == 10, "ten records after change");
    P = 0;
    repeat (300) begin @(negedge clk); check(!valid, "no record with period 0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
