// Self-checking testbench for the self-timed ring model.
//
// Two rings are closed on themselves (ring_out_req -> first_req_in,
// ack -> ring_out_ack), as the switch does when it is idle:
//   * u_ideal is a 13-stage ring with no Charlie or drafting term, so every
//     stage delay is the static delay D. With 2 tokens it is token-limited
//     and its period must be 2*N*D/NT = 2.6 ns for D = 0.2 ns.
//   * u_def is the default 26-stage ring with the full delay model; its
//     period must be steady and within 3% of 2*N*D/NT = 5.2 ns.
// In both, the token count must stay equal to the count loaded by reset.
// Both rings must also stop moving while rst is held.
`timescale 1ns / 1ps
module tb_str_ring;
  localparam int N = 13;
  localparam logic [N-1:0] INIT = 13'b0000000111111;
  localparam int ND = 26;
  localparam logic [ND-1:0] INIT_D = {13'h0, 13'h1fff};
  localparam int NT = 2;

  logic rst;
  logic req_i, ack_i, req_d, ack_d;
  logic [N-1:0] q_i;
  logic [ND-1:0] q_d;
  int checks = 0, failures = 0;

  str_ring #(.NSTAGES(N), .INIT(INIT), .D_CHARLIE(0.0), .DRAFT_B(0.0)) u_ideal (
    .rst(rst), .first_req_in(req_i), .ring_out_ack(ack_i),
    .ring_out_req(req_i), .ack(ack_i), .stage_q(q_i));

  str_ring u_def (
    .rst(rst), .first_req_in(req_d), .ring_out_ack(ack_d),
    .ring_out_req(req_d), .ack(ack_d), .stage_q(q_d));

  function automatic int tokens(input logic [ND-1:0] q, input int n_st);
    int n = 0;
    for (int i = 0; i < n_st; i++) if (q[i] != q[(i+1)%n_st]) n++;
    return n;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // rising-edge times of each ring's clock output
  realtime last_i = 0, per_i = 0, last_d = 0, per_d = 0;
  int n_i = 0, n_d = 0;
  always @(posedge req_i) if (!rst) begin per_i = $realtime - last_i; last_i = $realtime; n_i++; end
  always @(posedge req_d) if (!rst) begin per_d = $realtime - last_d; last_d = $realtime; n_d++; end

  int tok_err = 0;
  always @(q_d) if (!rst && tokens(q_d, ND) != NT) tok_err++;
  always @(q_i) if (!rst && tokens(ND'(q_i), N) != NT) tok_err++;

  initial begin
    #5000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime p0, pmin, pmax;
    rst = 1;
    #5;
    check(q_i == INIT && q_d == INIT_D, "reset pattern");
    rst = 0;
    #100;
    check(n_i > 20, "ideal ring oscillates");
    check(n_d > 10, "default ring oscillates");
    // ideal ring: exact token-limited period
    check(per_i > 2.599 && per_i < 2.601, $sformatf("ideal period %0.4f ns, expected 2.6", per_i));
    // default ring: steady period, sampled over 20 cycles
    p0 = per_d; pmin = p0; pmax = p0;
    repeat (20) begin
      @(posedge req_d);
      #0.001;
      if (per_d < pmin) pmin = per_d;
      if (per_d > pmax) pmax = per_d;
    end
    $display("default ring period %0.4f .. %0.4f ns", pmin, pmax);
    check(pmax - pmin < 0.05, "default ring period is steady");
    check(pmin > 5.2 * 0.97 && pmax < 5.2 * 1.03, "default period near 2*N*D/NT = 5.2 ns");
    // every stage toggles at the same rate
    begin
      int cnt [N];
      for (int i = 0; i < N; i++) cnt[i] = 0;
      fork
        begin : count
          forever begin
            logic [N-1:0] prev;
            prev = q_i;
            @(q_i);
            for (int i = 0; i < N; i++) if (q_i[i] != prev[i]) cnt[i]++;
          end
        end
        #52;
      join_any
      disable count;
      for (int i = 0; i < N; i++)
        check(cnt[i] >= 38 && cnt[i] <= 42, $sformatf("stage %0d toggled %0d times in 20 periods", i, cnt[i]));
    end
    check(tok_err == 0, $sformatf("token count changed %0d times", tok_err));
    // reset freezes the ring
    rst = 1;
    #1;
    n_i = 0; n_d = 0;
    #20;
    check(n_i == 0 && n_d == 0 && q_i == INIT && q_d == INIT_D, "rst holds the ring");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
