// tb_rr_arbiter: self-checking testbench of rr_arbiter.
//
// Applies random request vectors and random advance strobes and compares the
// grant with a reference round-robin model: the first requester at or after
// the priority position wins, and the priority moves just past the winner
// only when advance is high. Also checks that with all inputs requesting
// continuously each input is served once every N grants (fairness).
module tb_rr_arbiter;

  localparam int N = 4;

  logic         clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt;
  logic         advance;
  int           checks = 0, failures = 0;
  int           prio = 0;

  rr_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] ref_gnt(input logic [N-1:0] r, input int p);
    for (int off = 0; off < N; off++)
      if (r[(p + off) % N]) return N'(1) << ((p + off) % N);
    return '0;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int served [N];
    req = '0; advance = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      req     = N'($urandom);
      advance = ($urandom_range(0, 3) != 0);
      #1;
      checks++;
      if (gnt !== ref_gnt(req, prio)) begin
        failures++;
        $display("FAIL req=%b prio=%0d gnt=%b exp=%b", req, prio, gnt, ref_gnt(req, prio));
      end
      if (advance && req != 0) begin
        logic [N-1:0] g;
        g = ref_gnt(req, prio);
        for (int i = 0; i < N; i++) if (g[i]) prio = (i + 1) % N;
      end
    end
    // fairness: all requesting, always advancing
    for (int i = 0; i < N; i++) served[i] = 0;
    for (int cyc = 0; cyc < 4 * N; cyc++) begin
      @(negedge clk);
      req = '1; advance = 1;
      #1;
      for (int i = 0; i < N; i++) if (gnt[i]) served[i]++;
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (served[i] != 4) begin
        failures++;
        $display("FAIL fairness input %0d served %0d", i, served[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
