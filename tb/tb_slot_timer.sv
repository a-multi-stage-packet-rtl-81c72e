// tb_slot_timer: self-checking testbench of slot_timer.
//
// Runs the timer with SP = 1, 2 and 4 side by side and checks that slot_tick
// is high in the first clock and slot_end in the last clock of every slot of
// SP clocks, i.e. one tick per SP clocks.
module tb_slot_timer;

  logic clk = 0, rst_n = 0;
  logic t1, e1, t2, e2, t4, e4;
  int   checks = 0, failures = 0;

  slot_timer #(.SP(1)) u1 (.clk, .rst_n, .slot_tick(t1), .slot_end(e1));
  slot_timer #(.SP(2)) u2 (.clk, .rst_n, .slot_tick(t2), .slot_end(e2));
  slot_timer #(.SP(4)) u4 (.clk, .rst_n, .slot_tick(t4), .slot_end(e4));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what, input int cyc);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at clock %0d", what, cyc);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ticks4 = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 100; cyc++) begin
      check(t1 && e1, "SP=1", cyc);
      check(t2 == (cyc % 2 == 0) && e2 == (cyc % 2 == 1), "SP=2", cyc);
      check(t4 == (cyc % 4 == 0) && e4 == (cyc % 4 == 3), "SP=4", cyc);
      if (t4) ticks4++;
      @(negedge clk);
    end
    check(ticks4 == 25, "SP=4 tick rate", 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
