// Test-table workload with a fast ring: the clocking node built with an
// 8-stage ring holding 2 tokens (free-running period 2*N*D/NT = 1.6 ns for
// D = 0.2 ns) against slow partner clocks of 20 ns and 60 ns.
//
// Checks, per partner period P2: the free-running period is within 3% of
// 1.6 ns; with com = 1 every clock period equals P2 and every clock edge
// trails a partner edge by less than 0.5 ns; with com = 0 again the ring
// returns to its own period. Each of these mechanisms is counted.
`timescale 1ns / 1ps
module tb_node_fast_ring;
  logic rst, com, ack_anoc, clock, req_anoc, sel;
  int checks = 0, failures = 0;

  gals_sync_node #(.NSTAGES(8), .INIT(8'b0000_1111)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t %s", $time, what);
    end
  endtask

  real p2 = 0.0;
  realtime t_anoc = 0.0;
  initial begin
    ack_anoc = 1'b0;
    forever begin
      if (p2 == 0.0) #1;
      else begin
        #(p2 / 2.0);
        ack_anoc = !ack_anoc;
        t_anoc = $realtime;
      end
    end
  end

  realtime t_rise = 0.0, per = 0.0, lag = 0.0;
  always @(clock) begin
    lag = $realtime - t_anoc;
    if (clock) begin
      per = $realtime - t_rise;
      t_rise = $realtime;
    end
  end

  task automatic avg_period(input int n, output real avg);
    realtime t0;
    @(posedge clock);
    t0 = $realtime;
    repeat (n) @(posedge clock);
    avg = ($realtime - t0) / n;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real own, avg;
  real cases [2] = '{20.0, 60.0};
  int n_locked = 0, n_restored = 0;

  initial begin
    com = 1'b0;
    rst = 1'b0;
    #0.5;
    rst = 1'b1;
    #3;
    rst = 1'b0;
    repeat (5) @(posedge clock);
    avg_period(40, own);
    $display("free-running period %0.3f ns", own);
    check(own > 1.6 * 0.97 && own < 1.6 * 1.03, "free-running period near 1.6 ns");
    foreach (cases[k]) begin
      int bad;
      p2 = cases[k];
      #(2.0 * p2 + 0.37);
      com = 1'b1;
      @(posedge sel);
      repeat (6) @(posedge clock);
      bad = 0;
      repeat (8) begin
        @(clock);
        #0.001;
        if (lag > 0.5 || lag < 0.0) bad++;
        if (clock && (per < p2 - 0.02 || per > p2 + 0.02)) bad++;
      end
      check(bad == 0, $sformatf("P2=%0.1f: locked (period %0.3f, delay %0.3f)", p2, per, lag));
      if (bad == 0) n_locked++;
      $display("clock1 %0.3f ns, clock2 %0.1f ns: new clock %0.3f ns, delay %0.3f ns", own, p2, per, lag);
      com = 1'b0;
      @(negedge sel);
      repeat (6) @(posedge clock);
      avg_period(20, avg);
      check(avg > own - 0.02 && avg < own + 0.02, $sformatf("own period restored (%0.3f)", avg));
      if (avg > own - 0.02 && avg < own + 0.02) n_restored++;
    end
    check(n_locked == 2, "lock to slower partner happened for both cases");
    check(n_restored == 2, "own rate restored after both cases");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
