// Self-checking testbench for the Muller C-element: walks every input
// transition from both held states and compares the output with a reference
// that remembers the last value on which both inputs agreed.
`timescale 1ns / 1ps
module tb_c_element;
  logic a, b, y;
  logic ref_y;
  int checks = 0, failures = 0;

  c_element dut (.a(a), .b(b), .y(y));

  task automatic apply(input logic na, input logic nb);
    a = na; b = nb;
    #1;
    if (na == nb) ref_y = na;
    checks++;
    if (y !== ref_y) begin
      failures++;
      $display("FAIL a=%b b=%b y=%b expected %b", a, b, y, ref_y);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(1'b0, 1'b0);
    // from 0: single input rising must hold 0
    apply(1'b1, 1'b0);
    apply(1'b0, 1'b0);
    apply(1'b0, 1'b1);
    apply(1'b1, 1'b1);  // both high: output rises
    apply(1'b0, 1'b1);  // hold 1
    apply(1'b1, 1'b1);
    apply(1'b1, 1'b0);  // hold 1
    apply(1'b0, 1'b0);  // both low: falls
    for (int i = 0; i < 200; i++) apply(1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
