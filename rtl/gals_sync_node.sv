// Clocking node of one locally synchronous domain in a GALS system.
//
// A self-timed ring oscillator generates the domain clock; an asynchronous
// switch sits in the ring's feedback paths. While com = 0 the ring runs at
// its own rate. While com = 1 (data exchange with a partner domain) the
// switch joins the ring's reverse path with the partner clock ack_anoc, so
// the domain clock slows to the slower of the two clocks and stays in step
// with the partner; when com returns to 0 the ring goes back to its own rate.
// Clock changes happen only at completed clock phases and no clock is ever
// paused.
//
// Wiring (the ring's loop is closed through the switch):
//   ring.ring_out_req -> switch (C1)  -> ring.first_req_in
//   ring.ack          -> switch (C2)  -> ring.ring_out_ack
// The domain's synchronous logic and data port are clocked by clock; they
// are outside this node. req_anoc carries this domain's clock to the partner.
//
// Interface: rst (active high: loads the ring's set/reset pattern and
// clears the switch), com, ack_anoc in; clock, req_anoc, sel out. The ring
// parameters pass through to the ring model; their defaults give a free
// running clock period near 5.2 ns.
//
// The node's structure follows the published block diagram of the ring and
// switch; the ring is a timed behavioural model, so this node simulates but
// does not synthesize to a working oscillator without a real ring macro.
`timescale 1ns / 1ps
module gals_sync_node #(
  parameter int                 NSTAGES   = 26,
  parameter logic [NSTAGES-1:0] INIT      = {{(NSTAGES/2){1'b0}}, {(NSTAGES-NSTAGES/2){1'b1}}},
  parameter real                D_FF      = 0.200,
  parameter real                D_RR      = 0.200,
  parameter real                D_CHARLIE = 0.030,
  parameter real                DRAFT_A   = 0.300,
  parameter real                DRAFT_B   = 0.010
) (
  input  logic rst,
  input  logic com,
  input  logic ack_anoc,
  output logic clock,
  output logic req_anoc,
  output logic sel
);

  logic ring_out_req, ring_ack, first_stage_req, ring_out_ack;
  logic [NSTAGES-1:0] stage_q;

  str_ring #(
    .NSTAGES(NSTAGES), .INIT(INIT), .D_FF(D_FF), .D_RR(D_RR),
    .D_CHARLIE(D_CHARLIE), .DRAFT_A(DRAFT_A), .DRAFT_B(DRAFT_B)
  ) u_ring (
    .rst          (rst),
    .first_req_in (first_stage_req),
    .ring_out_ack (ring_out_ack),
    .ring_out_req (ring_out_req),
    .ack          (ring_ack),
    .stage_q      (stage_q)
  );

  async_switch u_switch (
    .rst             (rst),
    .com             (com),
    .ring_out_req    (ring_out_req),
    .ack_from_ring   (ring_ack),
    .ack_anoc        (ack_anoc),
    .first_stage_req (first_stage_req),
    .ring_out_ack    (ring_out_ack),
    .clock           (clock),
    .req_anoc        (req_anoc),
    .sel             (sel)
  );

endmodule
