// tb_noc_router: self-checking testbench of noc_router.
//
// Two routers of a 4-row, 2-column mesh are tested side by side: an inner
// router (row 1, column 0), whose packets can leave east, up or down, and a
// last-column router (row 1, column 1), whose east output is the LC link
// gated per output port by east_ok. For each, the testbench injects random
// packets on all three inputs while respecting the credits it gets back,
// models the downstream buffers (returning credits at random), and checks:
// every packet leaves on the output given by a reference Modulo XY routing
// function, in order per input, exactly once; no output is ever sent to
// without a downstream credit; the LC output only sends when east_ok is high
// for the packet's port; an empty router forwards a packet in one clock.
module tb_noc_router;
  import clos_udn_pkg::*;

  localparam int K = 4, DM = 2, BD = 3, NP = 4;
  localparam int NCFG = 2;
  localparam int NPKT = 600;

  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  int   contention = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int ref_route(input int row, input int col, input int dst);
    int turn;
    turn = dst % DM;
    if (col == turn && row > dst) return 1;  // up
    if (col == turn && row < dst) return 2;  // down
    return 0;                                // east
  endfunction

  int done_cnt = 0;

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int ROW = 1;
    localparam int COL = c;

    logic          in_valid  [NDIR];
    packet_t       in_pkt    [NDIR];
    logic          in_credit [NDIR];
    logic          out_valid [NDIR];
    packet_t       out_pkt   [NDIR];
    logic          out_credit[NDIR];
    logic [NP-1:0] east_ok;

    noc_router #(.ROW(ROW), .COL(COL), .K(K), .DEPTH_M(DM), .BD(BD), .NP(NP)) dut (
      .clk, .rst_n, .in_valid, .in_pkt, .in_credit, .out_valid, .out_pkt, .out_credit, .east_ok
    );

    initial begin
      packet_t exp_q [NDIR*NDIR][$];   // [output*NDIR + input]
      int      cin [NDIR];
      int      dn  [NDIR];
      int      sent = 0, recv = 0;
      int      seq = 0;
      packet_t p;

      for (int d = 0; d < NDIR; d++) begin
        in_valid[d] = 0; in_pkt[d] = '0; out_credit[d] = 0; cin[d] = BD; dn[d] = 0;
      end
      east_ok = '1;
      repeat (3) @(posedge clk);
      @(negedge clk);
      rst_n = 1;

      // Directed: one packet through an empty router takes one clock.
      p = '0; p.dst_om = 8'(ROW); p.dst_port = 8'd1; p.seq = 16'hBEEF;
      in_valid[0] = 1; in_pkt[0] = p;
      @(negedge clk);
      in_valid[0] = 0;
      #1;
      check(out_valid[0] && out_pkt[0] == p, "one-hop latency");
      @(negedge clk);
      out_credit[0] = (COL == 0);   // return the credit of that packet
      @(negedge clk);
      out_credit[0] = 0;

      // Random traffic.
      for (int cyc = 0; cyc < 20000 && recv < NPKT; cyc++) begin
        int wants [NDIR];
        east_ok = NP'($urandom);
        #1;
        for (int o = 0; o < NDIR; o++) wants[o] = 0;
        for (int o = 0; o < NDIR; o++) begin
          if (out_valid[o]) begin
            int src;
            src = int'(out_pkt[o].src_port);
            check(src < NDIR && exp_q[o*NDIR+src].size() > 0, "unexpected packet");
            if (src < NDIR && exp_q[o*NDIR+src].size() > 0) begin
              check(out_pkt[o] == exp_q[o*NDIR+src][0], "order / content");
              void'(exp_q[o*NDIR+src].pop_front());
            end
            if (o == 0 && COL == DM - 1)
              check(east_ok[out_pkt[o].dst_port[1:0]], "LC sent without east_ok");
            else begin
              check(dn[o] < BD, "sent without credit");
              dn[o]++;
            end
            recv++;
          end
        end
        for (int i = 0; i < NDIR; i++) if (in_credit[i]) cin[i]++;
        for (int o = 0; o < NDIR; o++) begin
          out_credit[o] = 0;
          if (dn[o] > 0 && $urandom_range(0, 2) != 0) begin
            out_credit[o] = 1;
            dn[o]--;
          end
        end
        for (int i = 0; i < NDIR; i++) begin
          in_valid[i] = 0;
          if (sent < NPKT && cin[i] > 0 && $urandom_range(0, 3) != 0) begin
            int o;
            p = '0;
            p.dst_om   = 8'($urandom_range(0, K - 1));
            p.dst_port = 8'($urandom_range(0, NP - 1));
            p.src_port = 8'(i);
            p.seq      = 16'(seq);
            seq++;
            o = ref_route(ROW, COL, int'(p.dst_om));
            wants[o]++;
            exp_q[o*NDIR+i].push_back(p);
            in_valid[i] = 1;
            in_pkt[i]   = p;
            cin[i]--;
            sent++;
          end
        end
        for (int o = 0; o < NDIR; o++) if (wants[o] > 1) contention++;
        @(negedge clk);
      end
      for (int o = 0; o < NDIR; o++)
        for (int i = 0; i < NDIR; i++)
          check(exp_q[o*NDIR+i].size() == 0, "packet lost");
      check(recv == NPKT, "all packets delivered");
      done_cnt++;
    end
  end

  initial begin
    wait (done_cnt == NCFG);
    check(contention > 0, "output contention exercised");
    $display("contention events: %0d", contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
