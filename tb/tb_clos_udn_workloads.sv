// tb_clos_udn_workloads: traffic experiments on the Clos-UDN switch.
//
// Runs the traffic patterns used to evaluate the switch on several
// configurations at once, each with its own clock: the 64 x 64 switch
// (K = N_PORT = 8, full-depth 8 x 8 meshes, BD = 4) with speedup SP = 1, 2
// and 4.
// Traffic is generated per input port into an unbounded line-card queue
// (a SystemVerilog queue), from which packets enter the switch as fast as
// ip_ready allows. Patterns:
//   uniform  : Bernoulli arrivals with probability `load` per slot, uniform
//              destinations;
//   bursty   : on/off bursts of geometric length (mean 10 packets) to one
//              destination, off periods sized for the given load;
//   unbal(w) : Bernoulli arrivals; with probability w the destination is the
//              output with the same index as the input, otherwise uniform.
// Each experiment runs WARM slots of warm-up, MEAS slots of measurement and
// then drains. Reported per experiment: throughput (packets delivered during
// the measurement window per output per slot) and mean delay in slots from
// generation to departure of the packets delivered in the window.
// Checks: every packet leaves once, on the output its header names; every
// experiment drains completely; with SP >= 2 the switch carries an offered
// uniform load of 0.3 and 0.9 (throughput within 0.03 of the load); and a
// higher speedup gives a lower delay at light load (SP = 4 below SP = 1).
module tb_clos_udn_workloads;
  import clos_udn_pkg::*;

  localparam int NCFG = 3;
  localparam int CFG_K  [NCFG] = '{8, 8, 8};
  localparam int CFG_SP [NCFG] = '{1, 2, 4};
  localparam int WARM = 150, MEAS = 600;

  typedef enum int { UNIFORM, BURSTY, UNBAL } pattern_e;
  typedef struct { pattern_e pat; real load; real w; string name; } exp_t;

  localparam int NEXP = 6;
  exp_t exps [NEXP];

  int  checks = 0, failures = 0;
  real thr   [NCFG][NEXP];
  real delay [NCFG][NEXP];
  bit  ran   [NCFG][NEXP];
  int  done_cnt = 0;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endfunction

  initial begin
    exps[0] = '{UNIFORM, 0.3, 0.0, "uniform  load 0.3"};
    exps[1] = '{UNIFORM, 0.9, 0.0, "uniform  load 0.9"};
    exps[2] = '{UNIFORM, 1.0, 0.0, "uniform  load 1.0"};
    exps[3] = '{BURSTY,  0.8, 0.0, "bursty10 load 0.8"};
    exps[4] = '{UNBAL,   1.0, 0.5, "unbal w=0.5 load 1.0"};
    exps[5] = '{UNBAL,   1.0, 1.0, "unbal w=1.0 load 1.0"};
  end

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int K   = CFG_K[g];
    localparam int NPT = CFG_K[g];
    localparam int SP  = CFG_SP[g];
    localparam int N   = K * NPT;

    logic    clk = 0, rst_n = 0;
    logic    slot_tick;
    logic    ip_valid [N];
    packet_t ip_pkt   [N];
    logic    ip_ready [N];
    logic    op_valid [N];
    packet_t op_pkt   [N];

    clos_udn_switch #(.K(K), .N_PORT(NPT), .SP(SP)) dut (.*);

    always #5 clk = ~clk;

    int slot = 0;            // current slot number
    int born [int];          // (src << 16 | seq) -> generation slot
    int win_cnt = 0;
    longint win_delay = 0;
    bit measuring = 0;

    // departures
    always @(negedge clk) if (rst_n) begin
      #2;
      if (slot_tick) begin
        for (int o = 0; o < N; o++) begin
          if (op_valid[o]) begin
            int src, key;
            src = int'(op_pkt[o].src_im) * NPT + int'(op_pkt[o].src_port);
            key = (src << 16) | int'(op_pkt[o].seq);
            if (int'(op_pkt[o].dst_om) * NPT + int'(op_pkt[o].dst_port) != o) begin
              failures++;
              $display("FAIL cfg %0d: packet on wrong output", g);
            end
            if (!born.exists(key)) begin
              failures++;
              $display("FAIL cfg %0d: unknown or duplicated packet", g);
            end else begin
              if (measuring) begin
                win_cnt++;
                win_delay += slot - born[key];
              end
              born.delete(key);
            end
          end
        end
      end
    end

    initial begin
      packet_t lq [N][$];     // line-card queues
      int      seq [N];
      int      burst_dst [N];
      bit      in_burst [N];
      for (int p = 0; p < N; p++) begin
        ip_valid[p] = 0; ip_pkt[p] = '0; seq[p] = 0; in_burst[p] = 0; burst_dst[p] = 0;
      end
      repeat (2) @(posedge clk);
      @(negedge clk);
      rst_n = 1;
      for (int e = 0; e < NEXP; e++) begin
        ran[g][e] = 1;
        win_cnt = 0; win_delay = 0;
        for (int s = 0; s < WARM + MEAS + 4000; s++) begin
          bit gen;
          gen = (s < WARM + MEAS);
          measuring = (s >= WARM && s < WARM + MEAS);
          if (!gen && born.size() == 0) break;
          // arrivals
          for (int p = 0; p < N && gen; p++) begin
            bit arrive;
            int d;
            arrive = 0; d = 0;
            case (exps[e].pat)
              UNIFORM: begin
                arrive = ($urandom_range(0, 9999) < int'(exps[e].load * 10000.0));
                d = $urandom_range(0, N - 1);
              end
              UNBAL: begin
                arrive = ($urandom_range(0, 9999) < int'(exps[e].load * 10000.0));
                d = ($urandom_range(0, 9999) < int'(exps[e].w * 10000.0)) ? p : $urandom_range(0, N - 1);
              end
              BURSTY: begin
                // on: end with prob 1/10 after each packet; off: start with prob p/(10(1-p))
                if (!in_burst[p] && $urandom_range(0, 9999) <
                    int'(10000.0 * exps[e].load / (10.0 * (1.0 - exps[e].load)))) begin
                  in_burst[p] = 1;
                  burst_dst[p] = $urandom_range(0, N - 1);
                end
                if (in_burst[p]) begin
                  arrive = 1;
                  d = burst_dst[p];
                  if ($urandom_range(0, 9) == 0) in_burst[p] = 0;
                end
              end
              default: ;
            endcase
            if (arrive) begin
              packet_t q;
              q = '0;
              q.dst_om = 8'(d / NPT); q.dst_port = 8'(d % NPT);
              q.src_im = 8'(p / NPT); q.src_port = 8'(p % NPT);
              q.seq = 16'(seq[p]);
              born[(p << 16) | (seq[p] & 16'hFFFF)] = slot;
              seq[p] = (seq[p] + 1) & 16'hFFFF;
              lq[p].push_back(q);
            end
          end
          // offer the head of each line-card queue in this slot's tick clock
          #1;
          for (int p = 0; p < N; p++) begin
            ip_valid[p] = 0;
            if (lq[p].size() > 0 && ip_ready[p]) begin
              ip_valid[p] = 1;
              ip_pkt[p]   = lq[p].pop_front();
            end
          end
          @(negedge clk);
          for (int p = 0; p < N; p++) ip_valid[p] = 0;
          repeat (SP - 1) @(negedge clk);
          slot++;
        end
        measuring = 0;
        check(born.size() == 0, $sformatf("cfg %0d exp %0d drained", g, e));
        for (int p = 0; p < N; p++) in_burst[p] = 0;
        thr[g][e]   = real'(win_cnt) / real'(N * MEAS);
        delay[g][e] = (win_cnt > 0) ? real'(win_delay) / real'(win_cnt) : 0.0;
        $display("%0dx%0d SP=%0d  %-22s throughput %.3f  mean delay %.1f slots",
                 N, N, SP, exps[e].name, thr[g][e], delay[g][e]);
      end
      done_cnt++;
    end
  end

  initial begin
    wait (done_cnt == NCFG);
    for (int g = 0; g < NCFG; g++) begin
      if (CFG_SP[g] >= 2) begin
        check(thr[g][0] > 0.27 && thr[g][0] < 0.33, $sformatf("cfg %0d carries load 0.3", g));
        check(thr[g][1] > 0.87 && thr[g][1] < 0.93, $sformatf("cfg %0d carries load 0.9", g));
      end
    end
    check(delay[2][0] < delay[0][0], "higher speedup lowers light-load delay");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
