// tb_slot_timer: checks that the cell-slot sequencer counts T0..T12, that a
// slot is 13 clocks long (520 ns at 40 ns) and that slot_start marks T0.
`timescale 1ns/1ps
module tb_slot_timer;
  import shaper_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #20 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  phase_t phase;
  logic   slot_start;
  slot_timer dut (.clk, .rst_n, .phase, .slot_start);

  initial begin : main
    realtime t_prev;
    repeat (2) @(posedge clk);
    #1 check(phase == 0 && slot_start, "phase held at T0 in reset");
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 13 * 20; n++) begin
      check(phase == phase_t'(n % 13), $sformatf("phase %0d at clock %0d", phase, n));
      check(slot_start == (n % 13 == 0), "slot_start on T0 only");
      @(negedge clk);
    end
    @(posedge clk iff slot_start);
    t_prev = $realtime;
    @(posedge clk iff slot_start);
    check($realtime - t_prev == 520.0, $sformatf("slot period %0t", $realtime - t_prev));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
