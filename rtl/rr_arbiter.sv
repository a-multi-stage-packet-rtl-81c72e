// rr_arbiter: round-robin arbiter, the per-output arbitration unit of a NoC
// router.
//
// Grants exactly one of the asserted requests (one-hot gnt), searching from
// the position after the last winner. The priority pointer moves past the
// winner only when `advance` is high in a cycle with a grant, so a requester
// that was granted but could not be served keeps its turn. Grant is
// combinational from req and the registered pointer; the pointer updates on
// the clock edge. Reset gives input 0 the highest priority.
module rr_arbiter #(
  parameter int N = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt
);

  localparam int IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] prio;     // index with the highest priority this cycle
  logic [IW-1:0] win;
  logic          any;

  always_comb begin
    gnt = '0;
    win = '0;
    any = 1'b0;
    for (int off = 0; off < N; off++) begin
      int idx;
      idx = int'(prio) + off;
      if (idx >= N) idx -= N;
      if (!any && req[idx]) begin
        any      = 1'b1;
        win      = IW'(idx);
        gnt[idx] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) prio <= '0;
    else if (advance && any) prio <= (win == IW'(N - 1)) ? '0 : win + 1'b1;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  a_grant_requested: assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0);

endmodule
