// End-to-end testbench of the clocking node at its default size (26-stage
// ring with 2 tokens, free-running period near 5.2 ns).
//
// A partner domain clock ack_anoc of period P2 is applied and com is raised
// and lowered for each P2 of the test table (1, 2, 5, 6, 15, 30 and 60 ns).
// For every case the testbench checks, against numbers it works out itself:
//   * free running (com = 0): clock period equals the ring's own period,
//     measured once at the start (and within 2% of 2*N*D/NT = 5.2 ns);
//   * sel rises within one clock period of com rising, and falls within two
//     clock periods of com falling;
//   * partner slower than the ring (P2 > 1.15 * own period): every clock
//     period equals P2 and every clock edge trails a partner edge by less
//     than 0.5 ns (the clock is locked to the slower partner);
//   * partner faster than the ring: the average clock period stays between
//     the ring's own period and that plus half of P2 (the ring keeps its own
//     rate, slightly stretched while C2 waits for the partner's level);
//   * after com falls the ring returns to its own period;
//   * the clock never shows a phase shorter than two ring stage delays
//     (2 * 0.2 ns): no runt pulse or glitch at a switch-over. The duty cycle
//     itself may change: while locked to a slow partner the ring's two
//     tokens gather in front of the last stage, and after release they keep
//     that spacing (period unchanged, unequal high and low phases).
// Each mechanism (switch on, switch off, locked to a slower partner, own
// rate kept against a faster partner, own rate restored) is counted, and one
// that never happened counts as a failure.
`timescale 1ns / 1ps
module tb_gals_sync_node;
  logic rst, com, ack_anoc, clock, req_anoc, sel;
  int checks = 0, failures = 0;

  gals_sync_node dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t %s", $time, what);
    end
  endtask

  // partner clock and the time of its last edge
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


  // clock edge bookkeeping
  realtime t_rise = 0.0, t_edge = 0.0, per = 0.0, min_phase = 1.0e9, lag = 0.0;
  always @(clock) begin
    if (!rst) begin
      if ($realtime - t_edge < min_phase && t_edge > 0.0) min_phase = $realtime - t_edge;
      t_edge = $realtime;
      lag = $realtime - t_anoc;
      if (clock) begin
        per = $realtime - t_rise;
        t_rise = $realtime;
      end
    end
  end

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // average period of the next n clock cycles
  task automatic avg_period(input int n, output real avg);
    realtime t0;
    @(posedge clock);
    t0 = $realtime;
    repeat (n) @(posedge clock);
    avg = ($realtime - t0) / n;
  endtask

  real own, avg;
  int n_on = 0, n_off = 0, n_locked = 0, n_fast = 0, n_restored = 0;
  real cases [7] = '{1.0, 2.0, 5.0, 6.0, 15.0, 30.0, 60.0};

  initial begin
    com = 1'b0;
    rst = 1'b0;
    #0.5;
    rst = 1'b1;   // a rising edge, for the asynchronous resets
    #3;
    rst = 1'b0;
    repeat (5) @(posedge clock);
    avg_period(20, own);
    $display("free-running period %0.3f ns", own);
    check(own > 5.2 * 0.98 && own < 5.2 * 1.02, "free-running period near 5.2 ns");

    foreach (cases[k]) begin
      realtime t_com;
      p2 = cases[k];
      #(3.0 * p2);
      // switch on at a point unrelated to either clock
      #(($urandom % 5000) / 1000.0);
      com = 1'b1;
      t_com = $realtime;
      @(posedge sel);
      check($realtime - t_com <= own + 0.01, $sformatf("sel rose %0.3f ns after com", $realtime - t_com));
      n_on++;
      repeat (12) @(posedge clock);
      if (p2 > 1.15 * own) begin
        int bad;
        bad = 0;
        repeat (8) begin
          @(clock);
          #0.001;
          if (lag > 0.5 || lag < 0.0) bad++;
          if (clock && (per < p2 - 0.02 || per > p2 + 0.02)) bad++;
        end
        if (bad != 0) $display("  lag %0.3f, period %0.3f", lag, per);
        check(bad == 0, $sformatf("P2=%0.1f: clock locked to partner (last period %0.3f, lag %0.3f)", p2, per, lag));
        if (bad == 0) n_locked++;
        $display("P2=%5.1f ns: new clock period %0.3f ns, delay after partner edge %0.3f ns", p2, per, lag);
      end else begin
        avg_period(20, avg);
        check(avg >= own - 0.01 && avg <= own + p2 / 2.0 + 0.01,
              $sformatf("P2=%0.1f: average period %0.3f stays at own rate", p2, avg));
        if (avg >= own - 0.01 && avg <= own + p2 / 2.0 + 0.01) n_fast++;
        $display("P2=%5.1f ns: new clock average period %0.3f ns", p2, avg);
      end
      // switch off
      t_com = $realtime;
      com = 1'b0;
      @(negedge sel);
      check($realtime - t_com <= 2.0 * ((p2 > own) ? p2 : own) + 0.5,
            $sformatf("sel fell %0.3f ns after com", $realtime - t_com));
      n_off++;
      repeat (4) @(posedge clock);
      avg_period(10, avg);
      check(avg > own - 0.02 && avg < own + 0.02, $sformatf("own period restored (%0.3f)", avg));
      if (avg > own - 0.02 && avg < own + 0.02) n_restored++;
    end

    check(min_phase >= 2.0 * 0.2, $sformatf("shortest clock phase %0.3f ns", min_phase));
    $display("shortest clock phase seen %0.3f ns", min_phase);
    check(n_on > 0, "switch-on happened");
    check(n_off > 0, "switch-off happened");
    check(n_locked > 0, "lock to slower partner happened");
    check(n_fast > 0, "own rate kept against faster partner happened");
    check(n_restored > 0, "own rate restored happened");
    $display("switch on %0d, off %0d, locked %0d, fast partner %0d, restored %0d",
             n_on, n_off, n_locked, n_fast, n_restored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
