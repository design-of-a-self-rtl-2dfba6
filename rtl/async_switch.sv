// Asynchronous switch: couples a self-timed ring's clock to a partner clock.
//
// A self-timed ring oscillator produces the clock of its domain. The switch
// sits in the ring's two feedback paths:
//   * forward path: the last stage's output ring_out_req passes through
//     C-element C1 (both inputs tied to ring_out_req, so C1 acts as a
//     matched buffer) and returns to the ring as first_stage_req;
//   * reverse path: C-element C2 drives ring_out_ack, the reverse input of
//     the ring's last stage. One C2 input is the ring's own acknowledge
//     ack_from_ring; the other is the output of a 2:1 mux that selects
//     ack_from_ring (sel = 0) or the partner clock ack_anoc (sel = 1).
// With sel = 0, C2 only buffers ack_from_ring and the ring runs at its own
// rate. With sel = 1, C2 waits until both the ring and the partner clock
// have made the same transition, so the ring can only advance as fast as the
// slower of the two: the domain clock follows the slower clock, and no clock
// is ever stopped.
//
// Select generation: DFF1 samples com on the falling edge of the domain
// clock, DFF2 re-samples DFF1 on the following rising edge, and
// sel = DFF1 | DFF2. sel therefore rises just after a falling clock edge
// (the running clock cycle has completed its high phase) and falls just after
// a rising clock edge, one half cycle after DFF1 has seen com = 0, so the mux
// never switches in the middle of a clock phase.
//
// Interface: com (1 = data exchange with the partner domain), ack_anoc (the
// partner's clock/acknowledge), ring_out_req and ack_from_ring (from the
// ring) are inputs; first_stage_req and ring_out_ack (to the ring), clock
// (the domain clock, equal to ring_out_req), req_anoc (the request sent to
// the partner) and sel are outputs. rst clears both flip-flops
// asynchronously. All timing is set by the gates: the switch has no clock
// of its own.
//
// The gate list and connections follow the published schematic. This
// design's own choices: the asynchronous reset of the flip-flops, req_anoc
// being the domain clock itself, and the buffer on ack_anoc being a plain
// buffer (the mux already isolates ack_anoc while sel = 0). The C-elements
// are zero-delay here; the ring model carries all delay.
`timescale 1ns / 1ps
module async_switch (
  input  logic rst,
  input  logic com,
  input  logic ring_out_req,
  input  logic ack_from_ring,
  input  logic ack_anoc,
  output logic first_stage_req,
  output logic ring_out_ack,
  output logic clock,
  output logic req_anoc,
  output logic sel
);

  logic dff1_q, dff2_q;
  logic anoc_buf;
  logic mux_out;

  assign clock    = ring_out_req;
  assign req_anoc = ring_out_req;

  // C1: holds the forward request for the ring's first stage
  c_element u_c1 (.a(ring_out_req), .b(ring_out_req), .y(first_stage_req));

  // DFF1: com sampled on the falling clock edge
  always_ff @(negedge clock or posedge rst) begin
    if (rst) dff1_q <= 1'b0;
    else     dff1_q <= com;
  end

  // DFF2: DFF1 re-sampled on the rising clock edge
  always_ff @(posedge clock or posedge rst) begin
    if (rst) dff2_q <= 1'b0;
    else     dff2_q <= dff1_q;
  end

  assign sel      = dff1_q | dff2_q;
  assign anoc_buf = ack_anoc;
  assign mux_out  = sel ? anoc_buf : ack_from_ring;

  // C2: joins the ring's acknowledge with the selected clock
  c_element u_c2 (.a(mux_out), .b(ack_from_ring), .y(ring_out_ack));

  // The select may only move while the clock is in a settled phase: rising
  // just after a falling clock edge, falling just after a rising one.
  // A reset may clear sel at any time, so it is exempt, and so is the
  // power-up settling at time zero.
  always @(posedge sel) assert ($time == 0 || !clock || rst) else $error("sel rose while clock high");
  always @(negedge sel) assert ($time == 0 || clock || rst)  else $error("sel fell while clock low");

endmodule
