// tb_clos_udn_full: the Clos-UDN switch at its default size (64 x 64: 8 input
// modules, 8 central modules of 8 x 8 routers, 8 output modules, router
// buffers of 4, speedup 2) taken through one complete operation.
//
// First one packet crosses the empty switch from IP(0,0) to OP(7,7) and its
// latency is checked against the expected count: one slot in the input FIFO,
// 1 + (M-1) + 7 router hops of one clock each, LC transfer in a slot_tick
// clock, one slot in the output buffer. Then every input sends a packet to
// every output (a full all-to-all exchange, 4096 packets), offered at once
// and as fast as the FIFOs accept them. Every packet must leave exactly once,
// on the output port in its header, in a slot_tick clock.
module tb_clos_udn_full;
  import clos_udn_pkg::*;

  localparam int K = 8, NPT = 8, DM = 8, SP = 2;
  localparam int N = K * NPT;

  logic    clk = 0, rst_n = 0;
  logic    slot_tick;
  logic    ip_valid [N];
  packet_t ip_pkt   [N];
  logic    ip_ready [N];
  logic    op_valid [N];
  packet_t op_pkt   [N];
  int      checks = 0, failures = 0;

  clos_udn_switch dut (.*);

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

  bit got [N][N];   // [input][output] packet received
  int recv = 0, c = 0, first_out = -1;

  always @(negedge clk) if (rst_n) begin
    #2;
    for (int o = 0; o < N; o++) begin
      if (op_valid[o]) begin
        int src;
        src = int'(op_pkt[o].src_im) * NPT + int'(op_pkt[o].src_port);
        check(slot_tick, "output outside slot_tick");
        check(int'(op_pkt[o].dst_om) * NPT + int'(op_pkt[o].dst_port) == o, "wrong output port");
        if (op_pkt[o].seq == 16'hFFFF) first_out = c;
        else begin
          check(src < N && !got[src][o], "duplicate packet");
          if (src < N) got[src][o] = 1;
          recv++;
        end
      end
    end
  end

  function automatic packet_t mk(input int src, input int dst, input int seq);
    packet_t p;
    p = '0;
    p.dst_om = 8'(dst / NPT); p.dst_port = 8'(dst % NPT);
    p.src_im = 8'(src / NPT); p.src_port = 8'(src % NPT);
    p.seq = 16'(seq);
    return p;
  endfunction

  initial begin
    int next_dst [N];
    int exp_t;
    for (int p = 0; p < N; p++) begin ip_valid[p] = 0; ip_pkt[p] = '0; next_dst[p] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // one packet, empty switch: IP(0,0) -> OP(7,7)
    ip_valid[0] = 1; ip_pkt[0] = mk(0, N - 1, 16'hFFFF);
    @(negedge clk); c++;
    ip_valid[0] = 0;
    exp_t = SP + 1 + (DM - 1) + 7;
    while (exp_t % SP != 0) exp_t++;
    exp_t += SP;
    repeat (60) begin @(negedge clk); c++; end
    check(first_out == exp_t, "single packet latency");
    $display("single packet latency: %0d clocks (expected %0d)", first_out, exp_t);

    // all-to-all: input p sends to outputs (p + 0), (p + 1), ... in turn
    for (int cyc = 0; cyc < 40000 && recv < N * N; cyc++) begin
      #1;
      for (int p = 0; p < N; p++) begin
        ip_valid[p] = 0;
        if (slot_tick && ip_ready[p] && next_dst[p] < N) begin
          ip_valid[p] = 1;
          ip_pkt[p]   = mk(p, (p + next_dst[p]) % N, next_dst[p]);
          next_dst[p]++;
        end
      end
      @(negedge clk); c++;
    end
    check(recv == N * N, "all-to-all exchange complete");
    for (int s = 0; s < N; s++)
      for (int o = 0; o < N; o++)
        if (!got[s][o]) begin
          failures++;
          $display("FAIL missing packet %0d -> %0d", s, o);
        end
    $display("all-to-all: %0d packets in %0d clocks", recv, c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
