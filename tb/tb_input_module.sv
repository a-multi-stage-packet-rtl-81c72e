// tb_input_module: self-checking testbench of input_module.
//
// A 4-FIFO input module runs with time slots of 2 clocks. The testbench feeds
// random packets into the input ports (and also raises ip_valid outside
// slot_tick clocks, which must be ignored), stands in for the central modules
// by keeping a model buffer of BD entries behind each LI link and returning
// credits at random, and predicts every clock: which link each FIFO may use
// ((h + slot) mod M), whether its head packet goes (non-empty FIFO and a
// credit left), the packet on each link, and ip_ready. Phases with scarce
// credits make FIFOs stall and fill up; both events are counted and must
// occur.
module tb_input_module;
  import clos_udn_pkg::*;

  localparam int M = 4, IQ_DEPTH = 3, BD = 2, SP = 2;

  logic    clk = 0, rst_n = 0;
  logic    slot_tick, slot_end;
  logic    ip_valid [M];
  packet_t ip_pkt   [M];
  logic    ip_ready [M];
  logic    li_valid [M];
  packet_t li_pkt   [M];
  logic    li_credit[M];
  int      checks = 0, failures = 0;
  int      stalls = 0, fulls = 0, sends = 0;

  slot_timer #(.SP(SP)) u_slot (.clk, .rst_n, .slot_tick, .slot_end);
  input_module #(.M(M), .IQ_DEPTH(IQ_DEPTH), .BD(BD)) dut (.*);

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
    packet_t q [M][$];
    int      cm [M];   // credits the IM should hold
    int      dn [M];   // occupancy of the model CM buffers
    int      seq = 0;
    for (int h = 0; h < M; h++) begin
      ip_valid[h] = 0; ip_pkt[h] = '0; li_credit[h] = 0; cm[h] = BD; dn[h] = 0;
    end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      bit      tick;
      int      slot, sel;
      bit      exp_v [M];
      packet_t exp_p [M];
      int      credit_pct, in_pct;
      int      pre [M];
      tick = (c % SP == 0);
      slot = c / SP;
      credit_pct = ((c / 400) % 2 == 0) ? 70 : 10;
      in_pct     = ((c / 400) % 2 == 0) ? 50 : 90;
      // predict the links
      for (int r = 0; r < M; r++) begin exp_v[r] = 0; exp_p[r] = '0; end
      for (int h = 0; h < M; h++) begin
        sel = (h + slot) % M;
        if (tick && q[h].size() > 0 && cm[sel] > 0) begin
          exp_v[sel] = 1;
          exp_p[sel] = q[h][0];
        end else if (tick && q[h].size() > 0) stalls++;
      end
      #1;
      check(slot_tick == tick, "slot timing");
      for (int r = 0; r < M; r++) begin
        check(li_valid[r] == exp_v[r], "li_valid");
        if (exp_v[r]) check(li_pkt[r] == exp_p[r], "li_pkt");
      end
      for (int h = 0; h < M; h++) begin
        check(ip_ready[h] == (q[h].size() < IQ_DEPTH), "ip_ready");
        if (q[h].size() == IQ_DEPTH) fulls++;
      end
      // model update for the coming clock edge
      for (int h = 0; h < M; h++) pre[h] = q[h].size();
      for (int h = 0; h < M; h++) begin
        sel = (h + slot) % M;
        if (exp_v[sel] && exp_p[sel] == q[h][0] && q[h].size() > 0 && cm[sel] > 0 && tick) begin
          void'(q[h].pop_front());
          cm[sel]--;
          dn[sel]++;
          sends++;
        end
      end
      for (int r = 0; r < M; r++) begin
        li_credit[r] = 0;
        if (dn[r] > 0 && $urandom_range(0, 99) < credit_pct) begin
          li_credit[r] = 1;
          dn[r]--;
          cm[r]++;
        end
      end
      for (int h = 0; h < M; h++) begin
        packet_t p;
        p = '0;
        p.dst_om = 8'($urandom_range(0, 7));
        p.src_port = 8'(h);
        p.seq = 16'(seq);
        seq++;
        ip_valid[h] = ($urandom_range(0, 99) < in_pct);
        ip_pkt[h]   = p;
        if (tick && ip_valid[h] && pre[h] < IQ_DEPTH) q[h].push_back(p);
      end
      @(negedge clk);
    end
    check(stalls > 0, "credit stall exercised");
    check(fulls > 0, "full FIFO exercised");
    check(sends > 100, "packets dispatched");
    $display("sends=%0d stalls=%0d full=%0d", sends, stalls, fulls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
