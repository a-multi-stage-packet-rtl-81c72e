// tb_clos_udn_switch: end-to-end testbench of the Clos-UDN switch.
//
// A 16 x 16 switch (4 input modules of 4 ports, 4 central modules with 4 x 4
// meshes, 4 output modules) with 2-deep router buffers, 4-deep input FIFOs,
// 8-deep output buffers and speedup 2. The testbench:
//  1. sends one packet through the empty switch and checks its latency
//     clock by clock: FIFO write, dispatch in the next slot, one hop per
//     clock across the mesh, LC transfer in a slot_tick clock, output in the
//     following slot;
//  2. offers uniform random traffic at high load, then hot-spot traffic where
//     most packets go to output 0, then lets the switch drain;
//  3. checks that every packet leaves exactly once, on the output port named
//     in its header, only in slot_tick clocks, and at most one per port per
//     slot.
// Monitors count how often each mechanism of the design acts: a full input
// FIFO, a dispatch held back for lack of CM credit, router output contention,
// vertical hops inside a mesh, output-buffer back-pressure and several
// packets reaching one output buffer in one slot. Each must happen at least
// once.
module tb_clos_udn_switch;
  import clos_udn_pkg::*;

  localparam int K = 4, NPT = 4, DM = 4, BD = 2, SP = 2, IQ = 4, OQ = 8;
  localparam int N = K * NPT;
  localparam int NROUT = NPT * K * DM;

  logic    clk = 0, rst_n = 0;
  logic    slot_tick;
  logic    ip_valid [N];
  packet_t ip_pkt   [N];
  logic    ip_ready [N];
  logic    op_valid [N];
  packet_t op_pkt   [N];
  int      checks = 0, failures = 0;

  clos_udn_switch #(.K(K), .N_PORT(NPT), .DEPTH_M(DM), .BD(BD), .SP(SP),
                    .IQ_DEPTH(IQ), .OQ_DEPTH(OQ)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- monitors
  int n_credit_stall = 0, n_fifo_full = 0, n_om_full = 0, n_om_multi = 0;
  int contention [NROUT];
  int vertical   [NROUT];

  for (genvar i = 0; i < K; i++) begin : g_mon_im
    always @(posedge clk) if (rst_n)
      for (int h = 0; h < NPT; h++)
        if (slot_tick && !dut.g_im[i].u_im.empty[h] && !dut.g_im[i].u_im.fire[h]) n_credit_stall++;
  end
  for (genvar j = 0; j < K; j++) begin : g_mon_om
    always @(posedge clk) if (rst_n)
      for (int h = 0; h < NPT; h++) begin
        if (!dut.g_om[j].u_om.space[h]) n_om_full++;
        if (dut.g_om[j].u_om.n_arr[h] > 1) n_om_multi++;
      end
  end
  for (genvar r = 0; r < NPT; r++) begin : g_mon_cm
    for (genvar y = 0; y < K; y++) begin : g_y
      for (genvar x = 0; x < DM; x++) begin : g_x
        localparam int IDX = (r * K + y) * DM + x;
        initial begin contention[IDX] = 0; vertical[IDX] = 0; end
        always @(posedge clk) if (rst_n) begin
          for (int o = 0; o < NDIR; o++)
            if ($countones(dut.g_cm[r].u_cm.g_row[y].g_col[x].u_router.req[o]) > 1)
              contention[IDX]++;
          if (dut.g_cm[r].u_cm.g_row[y].g_col[x].u_router.out_valid[DIR_N] ||
              dut.g_cm[r].u_cm.g_row[y].g_col[x].u_router.out_valid[DIR_S])
            vertical[IDX]++;
        end
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- stimulus
  bit      outstanding [int];   // seq -> in flight
  int      exp_port    [int];   // seq -> expected output index
  int      sent = 0, recv = 0;
  int      c = 0;               // clock count since reset release
  int      phase = 0;           // 0 directed, 1 uniform, 2 hot-spot, 3 drain
  int      directed_seq = -1, directed_t0 = 0, directed_exp = 0, directed_got = -1;

  function automatic int next_tick(input int t);
    while (t % SP != 0) t++;
    return t;
  endfunction

  // Output checker.
  always @(negedge clk) if (rst_n) begin
    #2;
    for (int o = 0; o < N; o++) begin
      if (op_valid[o]) begin
        int s;
        s = int'(op_pkt[o].seq);
        check(slot_tick, "output outside slot_tick");
        check(outstanding.exists(s), "unknown or duplicated packet");
        if (outstanding.exists(s)) begin
          check(exp_port[s] == o, "packet on wrong output port");
          outstanding.delete(s);
        end
        if (s == directed_seq) directed_got = c;
        recv++;
      end
    end
  end

  initial begin
    int tot_cont, tot_vert, fulls;
    for (int p = 0; p < N; p++) begin ip_valid[p] = 0; ip_pkt[p] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // 1. directed packet IP(0,0) -> OP(2,1)
    begin
      packet_t p;
      int t_li, t_lc;
      p = '0; p.dst_om = 8'd2; p.dst_port = 8'd1; p.src_im = 8'd0; p.src_port = 8'd0;
      p.seq = 16'(sent);
      directed_seq = sent;
      outstanding[sent] = 1; exp_port[sent] = 2 * NPT + 1; sent++;
      ip_valid[0] = 1; ip_pkt[0] = p;
      directed_t0 = c;
      t_li = directed_t0 + SP;                                  // dispatch slot
      t_lc = next_tick(t_li + 1 + (DM - 1) + 2);                // 2 rows down
      directed_exp = t_lc + SP;                                 // output slot
      @(negedge clk); c++;
      ip_valid[0] = 0;
      repeat (40) begin @(negedge clk); c++; end
      check(directed_got == directed_exp, "end-to-end latency of one packet");
      $display("directed packet: left at clock %0d, expected %0d", directed_got - directed_t0,
               directed_exp - directed_t0);
    end

    // 2. uniform then hot-spot traffic
    for (int cyc = 0; cyc < 6000; cyc++) begin
      phase = (cyc < 3000) ? 1 : 2;
      #1;
      for (int p = 0; p < N; p++) begin
        ip_valid[p] = 0;
        if (!ip_ready[p]) fulls++;
        if (slot_tick && ip_ready[p] && $urandom_range(0, 99) < 90) begin
          packet_t q;
          int d;
          d = (phase == 2 && $urandom_range(0, 99) < 60) ? 0 : $urandom_range(0, N - 1);
          q = '0;
          q.dst_om   = 8'(d / NPT);
          q.dst_port = 8'(d % NPT);
          q.src_im   = 8'(p / NPT);
          q.src_port = 8'(p % NPT);
          q.seq      = 16'(sent);
          outstanding[sent] = 1;
          exp_port[sent] = d;
          sent++;
          ip_valid[p] = 1;
          ip_pkt[p]   = q;
        end
      end
      @(negedge clk); c++;
    end
    for (int p = 0; p < N; p++) ip_valid[p] = 0;

    // 3. drain
    phase = 3;
    for (int cyc = 0; cyc < 20000 && outstanding.size() > 0; cyc++) begin @(negedge clk); c++; end
    check(outstanding.size() == 0, "all packets delivered");
    check(recv == sent, "delivered count equals sent count");

    tot_cont = 0; tot_vert = 0;
    for (int k = 0; k < NROUT; k++) begin tot_cont += contention[k]; tot_vert += vertical[k]; end
    n_fifo_full = fulls;
    check(n_fifo_full > 0,    "mechanism: input FIFO full");
    check(n_credit_stall > 0, "mechanism: dispatch waiting for CM credit");
    check(tot_cont > 0,       "mechanism: router output contention");
    check(tot_vert > 0,       "mechanism: vertical hop in a mesh");
    check(n_om_full > 0,      "mechanism: output buffer back-pressure");
    check(n_om_multi > 0,     "mechanism: several arrivals per output buffer per slot");
    $display("sent=%0d received=%0d fifo_full=%0d credit_stall=%0d contention=%0d vertical=%0d om_full=%0d om_multi=%0d",
             sent, recv, n_fifo_full, n_credit_stall, tot_cont, tot_vert, n_om_full, n_om_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
