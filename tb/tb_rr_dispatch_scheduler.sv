// tb_rr_dispatch_scheduler: self-checking testbench of rr_dispatch_scheduler.
//
// Instantiates the M schedulers of one input module (INIT = 0..M-1) driven by
// a slot_timer with SP = 3, and checks in every clock that scheduler h points
// at link (h + s) mod M during slot s, so the pointers move exactly once per
// slot and are always pairwise distinct.
module tb_rr_dispatch_scheduler;

  localparam int M  = 5;
  localparam int SP = 3;
  localparam int LW = $clog2(M);

  logic          clk = 0, rst_n = 0;
  logic          slot_tick, slot_end;
  logic [LW-1:0] sel [M];
  int            checks = 0, failures = 0;

  slot_timer #(.SP(SP)) u_slot (.clk, .rst_n, .slot_tick, .slot_end);

  for (genvar h = 0; h < M; h++) begin : g_s
    rr_dispatch_scheduler #(.M(M), .INIT(h)) dut (.clk, .rst_n, .slot_end, .link_sel(sel[h]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 300; cyc++) begin
      int slot;
      slot = cyc / SP;
      for (int h = 0; h < M; h++) begin
        checks++;
        if (int'(sel[h]) != (h + slot) % M) begin
          failures++;
          $display("FAIL cyc %0d sched %0d sel %0d exp %0d", cyc, h, sel[h], (h + slot) % M);
        end
      end
      checks++;
      if (slot_tick != (cyc % SP == 0) || slot_end != (cyc % SP == SP - 1)) begin
        failures++;
        $display("FAIL slot timing at cyc %0d", cyc);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
