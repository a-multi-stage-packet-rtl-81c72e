// tb_udn_cm: self-checking testbench of udn_cm (one UDN central module).
//
// A 4-row, 3-column mesh (so destination row 3 turns in column 0, exercising
// the modulo in the routing) with 2-deep router buffers, 2 output ports per
// output module and 2-clock time slots. The testbench plays the input modules
// (one packet per LI link per slot, only with a credit) and the output
// modules (random per-port space flags). Checks:
//  * directed: in an empty mesh a packet from row i to row j leaves on LC(j)
//    in the first slot_tick clock at least 1 + (M-1) + |i-j| clocks after it
//    was offered, i.e. one hop per clock;
//  * random: every packet leaves on the LC link of its destination row, only
//    in slot_tick clocks, only when its port had space, exactly once, and in
//    order for each (source row, destination row) pair, whose route is fixed.
module tb_udn_cm;
  import clos_udn_pkg::*;

  localparam int K = 4, DM = 3, BD = 2, NP = 2, SP = 2;
  localparam int NPKT = 3000;

  logic          clk = 0, rst_n = 0;
  logic          slot_tick, slot_end;
  logic          li_valid  [K];
  packet_t       li_pkt    [K];
  logic          li_credit [K];
  logic          lc_valid  [K];
  packet_t       lc_pkt    [K];
  logic [NP-1:0] lc_space  [K];
  int            checks = 0, failures = 0;
  int            vertical = 0, blocked = 0;

  slot_timer #(.SP(SP)) u_slot (.clk, .rst_n, .slot_tick, .slot_end);
  udn_cm #(.K(K), .DEPTH_M(DM), .BD(BD), .NP(NP)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    packet_t q [K*K][$];   // [src*K + dst]
    int      ci [K];
    int      seq = 0, sent = 0, recv = 0;
    int      c = 0;
    for (int i = 0; i < K; i++) begin
      li_valid[i] = 0; li_pkt[i] = '0; lc_space[i] = '1; ci[i] = BD;
    end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // Directed latency, one packet at a time in an empty mesh.
    for (int i = 0; i < K; i++) begin
      for (int j = 0; j < K; j++) begin
        packet_t p;
        int t0, t, exp_t, vdist;
        while (!slot_tick) @(negedge clk);
        p = '0; p.dst_om = 8'(j); p.dst_port = 8'(j % NP); p.src_im = 8'(i); p.seq = 16'(seq);
        seq++;
        li_valid[i] = 1; li_pkt[i] = p;
        t0 = c;
        @(negedge clk); c++;
        li_valid[i] = 0;
        vdist  = (i > j) ? i - j : j - i;
        exp_t = t0 + 1 + (DM - 1) + vdist;
        while (exp_t % SP != t0 % SP) exp_t++;
        t = -1;
        for (int w = 0; w < 40 && t < 0; w++) begin
          if (lc_valid[j]) begin
            t = c;
            check(lc_pkt[j] == p, "directed packet content");
          end
          @(negedge clk); c++;
        end
        check(t == exp_t, "directed latency");
        if (t != exp_t) $display("  row %0d -> %0d: got clock %0d, expected %0d", i, j, t - t0, exp_t - t0);
      end
    end
    for (int i = 0; i < K; i++) ci[i] = BD;   // all buffers drained again

    // Random traffic.
    for (int cyc = 0; cyc < 60000 && recv < NPKT; cyc++) begin
      for (int j = 0; j < K; j++) lc_space[j] = NP'($urandom);
      #1;
      for (int j = 0; j < K; j++) begin
        if (lc_space[j] != '1) blocked++;
        if (lc_valid[j]) begin
          int s, key;
          s = int'(lc_pkt[j].src_im);
          key = s * K + j;
          check(slot_tick, "LC outside slot_tick");
          check(lc_space[j][lc_pkt[j].dst_port[0]], "LC without space");
          check(int'(lc_pkt[j].dst_om) == j, "wrong LC link");
          check(s < K && q[key].size() > 0, "unexpected packet");
          if (s < K && q[key].size() > 0) begin
            check(lc_pkt[j] == q[key][0], "order per flow");
            void'(q[key].pop_front());
          end
          if (s != j) vertical++;
          recv++;
        end
      end
      for (int i = 0; i < K; i++) begin
        if (li_credit[i]) ci[i]++;
        li_valid[i] = 0;
        if (slot_tick && sent < NPKT && ci[i] > 0 && $urandom_range(0, 99) < 80) begin
          packet_t p;
          p = '0;
          p.dst_om   = 8'($urandom_range(0, K - 1));
          p.dst_port = 8'($urandom_range(0, NP - 1));
          p.src_im   = 8'(i);
          p.seq      = 16'(seq);
          seq++;
          q[i*K + int'(p.dst_om)].push_back(p);
          li_valid[i] = 1;
          li_pkt[i]   = p;
          ci[i]--;
          sent++;
        end
      end
      @(negedge clk);
    end
    for (int k = 0; k < K*K; k++) check(q[k].size() == 0, "packet lost");
    check(recv == NPKT, "all packets delivered");
    check(vertical > 0 && blocked > 0, "vertical moves and LC back-pressure exercised");
    $display("received=%0d vertical=%0d blocked=%0d", recv, vertical, blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
