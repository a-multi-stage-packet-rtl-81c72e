// tb_pkt_fifo: self-checking testbench of pkt_fifo.
//
// Drives random pushes and pops (never pushing into a full queue without a
// pop, never popping an empty one) and compares the head packet, empty, full
// and count against a queue model kept in the testbench. A watchdog ends the
// run if it hangs.
module tb_pkt_fifo;
  import clos_udn_pkg::*;

  localparam int DEPTH = 5;

  logic    clk = 0, rst_n = 0;
  logic    push, pop, empty, full;
  packet_t wr_pkt, rd_pkt;
  logic [$clog2(DEPTH+1)-1:0] count;
  int      checks = 0, failures = 0;
  packet_t model [$];

  pkt_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; wr_pkt = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      check(int'(count) == model.size(), "count");
      if (model.size() > 0) check(rd_pkt == model[0], "head");
      // phases: fill-biased, drain-biased, balanced
      pop  = (model.size() > 0) && ($urandom_range(0, 99) < ((cyc / 500) % 3 == 0 ? 30 : (cyc / 500) % 3 == 1 ? 80 : 50));
      push = ((model.size() < DEPTH) || pop) && ($urandom_range(0, 99) < ((cyc / 500) % 3 == 0 ? 80 : (cyc / 500) % 3 == 1 ? 30 : 50));
      wr_pkt = packet_t'({$urandom, $urandom});
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(wr_pkt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
