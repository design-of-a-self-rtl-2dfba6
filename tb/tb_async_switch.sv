// Self-checking testbench for the asynchronous switch, driven open-loop.
//
// ring_out_req is a free clock (the ring's output) and ack_from_ring and
// ack_anoc are driven by the testbench at random times. A reference C-element
// model in the testbench, fed by the expected mux output, predicts
// ring_out_ack; the select is predicted from the clock edges:
//   * after com rises, sel must be 0 until the next falling clock edge and 1
//     right after it;
//   * after com falls, sel must stay 1 through the next falling edge and the
//     rising edge before it, and drop right after the first rising edge that
//     follows that falling edge.
// The forward path (first_stage_req), clock and req_anoc must equal
// ring_out_req at all times.
`timescale 1ns / 1ps
module tb_async_switch;
  logic rst, com, ring_out_req, ack_from_ring, ack_anoc;
  logic first_stage_req, ring_out_ack, clock, req_anoc, sel;
  logic ref_ack, exp_sel;
  int checks = 0, failures = 0;

  async_switch dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t %s", $time, what);
    end
  endtask

  // ring clock, 5.2 ns period
  initial begin
    ring_out_req = 1'b0;
    forever #2.6 ring_out_req = !ring_out_req;
  end

  // reference C2: inputs are the expected mux output and ack_from_ring
  always @(ack_from_ring or ack_anoc or exp_sel) begin
    logic m;
    m = exp_sel ? ack_anoc : ack_from_ring;
    if (m == ack_from_ring) ref_ack = m;
  end

  // compare continuously, just after every input change settles
  bit checking = 1'b0;   // set once reset has been applied
  always @(ack_from_ring or ack_anoc or ring_out_req or sel) begin
    #0.01;
    if (checking) begin
    check(ring_out_ack == ref_ack, "ring_out_ack vs reference C-element");
    check(first_stage_req == ring_out_req && clock == ring_out_req && req_anoc == ring_out_req,
          "forward path and clock outputs");
    check(sel == exp_sel, "sel vs expected");
    end
  end

  // random activity on the two acknowledge inputs
  initial begin
    ack_from_ring = 1'b0;
    ack_anoc = 1'b0;
    forever begin
      #(0.3 + ($urandom % 300) / 100.0);
      if ($urandom % 2 == 1) ack_from_ring = !ack_from_ring;
      else              ack_anoc      = !ack_anoc;
    end
  end

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_on = 0, n_off = 0;

  initial begin
    exp_sel = 1'b0;
    ref_ack = 1'b0;
    com = 1'b0;
    rst = 1'b0;
    #0.5;
    rst = 1'b1;   // a rising edge, for the asynchronous resets
    #1.3;
    // C2 is transparent while sel = 0: settle ref to the DUT's start value
    rst = 1'b0;
    checking = 1'b1;
    #20;
    repeat (40) begin
      // switch on, at a random point of the clock cycle
      #(($urandom % 5200) / 1000.0);
      com = 1'b1;
      #0.01;
      check(sel == 1'b0, "sel waits for the falling clock edge");
      @(negedge ring_out_req);
      exp_sel = 1'b1;
      n_on++;
      #($urandom % 60);
      // switch off
      com = 1'b0;
      @(negedge ring_out_req);   // DFF1 clears here, DFF2 still 1
      #0.01;
      check(sel == 1'b1, "sel held by DFF2 after DFF1 clears");
      @(posedge ring_out_req);
      exp_sel = 1'b0;
      n_off++;
      #($urandom % 40);
    end
    check(n_on == 40 && n_off == 40, "all switch cycles completed");
    $display("switched on %0d times, off %0d times", n_on, n_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
