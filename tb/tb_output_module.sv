// tb_output_module: self-checking testbench of output_module.
//
// An output module with 3 input links, 2 ports and 5-entry buffers runs with
// 2-clock time slots. In each slot_tick clock the testbench offers a packet on
// every link, for a random port, but only when that port reports space, as
// the central modules do; it also has phases where all links target port 0,
// so up to M packets arrive for one port in one slot and the port fills. A
// queue model per port predicts space, op_valid and op_pkt: arrivals of one
// slot are queued in link order and each port sends at most one packet per
// slot, in its slot_tick clock.
module tb_output_module;
  import clos_udn_pkg::*;

  localparam int M = 3, NP = 2, OQ_DEPTH = 5, SP = 2;

  logic          clk = 0, rst_n = 0;
  logic          slot_tick, slot_end;
  logic          lc_valid [M];
  packet_t       lc_pkt   [M];
  logic [NP-1:0] space;
  logic          op_valid [NP];
  packet_t       op_pkt   [NP];
  int            checks = 0, failures = 0;
  int            multi = 0, nospace = 0, delivered = 0;

  slot_timer #(.SP(SP)) u_slot (.clk, .rst_n, .slot_tick, .slot_end);
  output_module #(.M(M), .NP(NP), .OQ_DEPTH(OQ_DEPTH)) dut (.*);

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
    packet_t q [NP][$];
    int      seq = 0;
    for (int r = 0; r < M; r++) begin lc_valid[r] = 0; lc_pkt[r] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      bit tick;
      int per_port [NP];
      tick = (c % SP == 0);
      #1;
      for (int h = 0; h < NP; h++) begin
        check(space[h] == (q[h].size() + M <= OQ_DEPTH), "space");
        check(op_valid[h] == (tick && q[h].size() > 0), "op_valid");
        if (op_valid[h] && q[h].size() > 0) begin
          check(op_pkt[h] == q[h][0], "op_pkt");
          void'(q[h].pop_front());
          delivered++;
        end
        if (!space[h]) nospace++;
        per_port[h] = 0;
      end
      for (int r = 0; r < M; r++) begin
        packet_t p;
        int      h;
        lc_valid[r] = 0;
        h = ((c / 300) % 2 == 1) ? 0 : $urandom_range(0, NP - 1);
        p = '0;
        p.dst_port = 8'(h);
        p.src_im   = 8'(r);
        p.seq      = 16'(seq);
        seq++;
        lc_pkt[r] = p;
        if (tick && space[h] && $urandom_range(0, 99) < 70) begin
          lc_valid[r] = 1;
          q[h].push_back(p);
          per_port[h]++;
        end
      end
      for (int h = 0; h < NP; h++) if (per_port[h] > 1) multi++;
      @(negedge clk);
    end
    check(multi > 0, "several arrivals per slot for one port");
    check(nospace > 0, "buffer space back-pressure");
    check(delivered > 500, "packets delivered");
    $display("delivered=%0d multi=%0d nospace=%0d", delivered, multi, nospace);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
