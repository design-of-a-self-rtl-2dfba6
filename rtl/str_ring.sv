// Self-timed ring (STR) oscillator, behavioural model.
//
// This is a behavioural model, not synthesizable logic: a real ring is a loop
// of C-elements whose oscillation period is set by analog gate delays, which
// the model reproduces with timed events.
//
// Structure: NSTAGES stages in a loop. Stage i is a C-element whose forward
// input is the output of stage i-1 and whose reverse input is the inverted
// output of stage i+1. The loop is opened at two points so that the
// asynchronous switch can sit in it:
//   * stage 0's forward input is first_req_in (normally the last stage's
//     output, ring_out_req, fed back through the switch);
//   * the last stage's reverse input is ring_out_ack (normally the inverted
//     output of stage 0, ack, fed back through the switch).
// A stage whose two inputs disagree is a token boundary; the number of
// tokens and bubbles is fixed by the set/reset pattern INIT loaded while rst
// is high (INIT[i] = 1 sets stage i, 0 resets it). The ring oscillates while
// it holds an even, non-zero number of tokens and at least one bubble.
//
// Stage timing follows the Charlie model with drafting. With t_f and t_r the
// last change times of the forward and reverse inputs,
//   s = (t_f - t_r)/2,  t_m = (t_f + t_r)/2,  y = t_m - (last output change)
//   delay from t_m = D_mean + sqrt(D_charlie^2 + (s - s_min)^2) - B*exp(-y/A)
//   D_mean = (D_ff + D_rr)/2,  s_min = (D_rr - D_ff)/2
// so an isolated forward event propagates in D_ff, an isolated reverse event
// in D_rr, and close input events take longer (Charlie effect) while close
// successive output events are faster (drafting effect). The form of the
// drafting term and all delay values are this model's choice. The default
// ring has 26 stages holding 2 tokens (set/reset pattern: lower half set,
// upper half reset) and 0.2 ns stage delays; it is token-limited, so its
// free-running period is close to 2*N*D/NT = 5.2 ns.
//
// Ports: rst (level, loads INIT), first_req_in, ring_out_ack (inputs);
// ring_out_req = output of the last stage (the domain clock), ack = inverted
// output of stage 0, stage_q = all stage outputs for observation.
`timescale 1ns / 1ps
module str_ring #(
  parameter int                NSTAGES   = 26,
  parameter logic [NSTAGES-1:0] INIT     = {{(NSTAGES/2){1'b0}}, {(NSTAGES-NSTAGES/2){1'b1}}},
  parameter real               D_FF      = 0.200,  // static forward delay, ns
  parameter real               D_RR      = 0.200,  // static reverse delay, ns
  parameter real               D_CHARLIE = 0.030,  // Charlie amplitude, ns
  parameter real               DRAFT_A   = 0.300,  // drafting duration, ns
  parameter real               DRAFT_B   = 0.010   // drafting amplitude, ns
) (
  input  logic               rst,
  input  logic               first_req_in,
  input  logic               ring_out_ack,
  output logic               ring_out_req,
  output logic               ack,
  output logic [NSTAGES-1:0] stage_q
);

  localparam real DMEAN = (D_FF + D_RR) / 2.0;
  localparam real SMIN  = (D_RR - D_FF) / 2.0;

  logic [NSTAGES-1:0] fwd, rev;

  always_comb begin
    for (int i = 0; i < NSTAGES; i++) begin
      fwd[i] = (i == 0) ? first_req_in : stage_q[i-1];
      rev[i] = (i == NSTAGES - 1) ? ring_out_ack : !stage_q[i+1];
    end
  end

  assign ring_out_req = stage_q[NSTAGES-1];
  assign ack          = !stage_q[0];

  for (genvar i = 0; i < NSTAGES; i++) begin : g_stage
    // One process per stage. It wakes on an input or reset change, stamps
    // the input that moved, and when the C-element is enabled waits the
    // Charlie delay and switches if it is still enabled. In a ring of
    // C-elements an enabled stage's inputs stay put until it has switched.
    realtime t_f, t_r, t_out;
    logic    pf, pr;

    always begin : run
      realtime tm, s, y, d;
      if (rst) begin
        stage_q[i] = INIT[i];
        @(negedge rst);
        // start from the settled state: all history begins at release
        pf = fwd[i]; pr = rev[i];
        t_f = $realtime; t_r = $realtime; t_out = $realtime;
      end else begin
        if (!(fwd[i] == rev[i] && fwd[i] != stage_q[i]))
          @(fwd[i] or rev[i] or rst);
        if (fwd[i] != pf) t_f = $realtime;
        if (rev[i] != pr) t_r = $realtime;
        pf = fwd[i]; pr = rev[i];
        if (!rst && fwd[i] == rev[i] && fwd[i] != stage_q[i]) begin
          tm = (t_f + t_r) / 2.0;
          s  = (t_f - t_r) / 2.0;
          y  = tm - t_out;
          d  = DMEAN + $sqrt(D_CHARLIE * D_CHARLIE + (s - SMIN) * (s - SMIN))
               - DRAFT_B * $exp(-y / DRAFT_A);
          // time still to wait, counted from now rather than from t_m
          d = tm + d - $realtime;
          if (d < 0.001) d = 0.001;
          #(d);
          if (!rst && fwd[i] == rev[i] && fwd[i] != stage_q[i]) begin
            stage_q[i] = fwd[i];
            t_out = $realtime;
          end
        end
      end
    end
  end

endmodule
