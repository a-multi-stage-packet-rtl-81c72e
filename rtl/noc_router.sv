// noc_router: one on-chip router of a unidirectional-NoC (UDN) central module.
//
// Input-queued, store-and-forward router at mesh position (ROW, COL) of a
// K-row by DEPTH_M-column mesh. It has three inputs, each with a BD-deep
// packet buffer: from the west (previous column, or the LI link in column 0),
// from the router above and from the router below. It has three outputs: east
// (next column, or the LC link in the last column), up and down. Packets only
// ever move east or vertically, never west.
//
// Routing (Modulo XY, as this design reads it): a packet for output module j
// travels east along its entry row up to column j mod DEPTH_M, moves up or
// down in that column until it reaches row j, then travels east along row j
// and leaves the mesh on LC(j). The route is recomputed at every hop from the
// destination in the header and the router's own coordinates. Vertical moves
// are confined to one column per packet, and up- and down-going packets use
// separate buffers, so the routing is deadlock-free.
//
// Each output has its own round-robin arbiter over the inputs whose head
// packet wants it and can be sent; since every input asks for one output
// only, the grants never clash and up to three packets leave per clock.
// Flow control is credit based: one credit counter per output, BD at reset,
// decremented per packet sent and incremented per credit returned by the
// downstream buffer; in_credit pulses when a packet leaves an input buffer.
// The east output of the last column has no credit counter: it may send a
// packet for output port h only when east_ok[h] is high, which the central
// module drives with the LC slot timing and the output-module buffer space.
// Timing: a packet written into a buffer at one clock edge can leave at the
// next, so a packet advances one hop per clock (per fabric cycle).
module noc_router
  import clos_udn_pkg::*;
#(
  parameter int ROW     = 0,
  parameter int COL     = 0,
  parameter int K       = 8,   // mesh rows (= output modules)
  parameter int DEPTH_M = 8,   // mesh columns (mesh depth M)
  parameter int BD      = 4,   // input buffer depth
  parameter int NP      = 8    // output ports per output module
) (
  input  logic    clk,
  input  logic    rst_n,
  // inputs, indexed by dir_e: DIR_E = from west, DIR_N = from above, DIR_S = from below
  input  logic    in_valid  [NDIR],
  input  packet_t in_pkt    [NDIR],
  output logic    in_credit [NDIR],
  // outputs, indexed by dir_e: east, up, down
  output logic    out_valid [NDIR],
  output packet_t out_pkt   [NDIR],
  input  logic    out_credit[NDIR],
  // last column only: LC link may take a packet for OM port h
  input  logic [NP-1:0] east_ok
);

  localparam bit LAST_COL = (COL == DEPTH_M - 1);
  localparam int CW       = $clog2(BD + 1);

  packet_t         head  [NDIR];
  logic            empty [NDIR];
  logic            full  [NDIR];
  logic            pop   [NDIR];
  dir_e            route [NDIR];
  logic [CW-1:0]   cred  [NDIR];
  logic [NDIR-1:0] req   [NDIR];   // req[o][i]
  logic [NDIR-1:0] gnt   [NDIR];   // gnt[o][i]

  function automatic dir_e next_hop(input packet_t p);
    int turn;
    turn = int'(p.dst_om) % DEPTH_M;
    if (COL == turn && ROW > int'(p.dst_om)) return DIR_N;
    if (COL == turn && ROW < int'(p.dst_om)) return DIR_S;
    return DIR_E;
  endfunction

  function automatic logic can_send(input dir_e o, input packet_t p);
    if (o == DIR_E && LAST_COL) begin
      for (int h = 0; h < NP; h++)
        if (int'(p.dst_port) == h) return east_ok[h];
      return 1'b0;
    end
    return cred[o] != '0;
  endfunction

  for (genvar i = 0; i < NDIR; i++) begin : g_in
    logic [$clog2(BD+1)-1:0] unused_count;

    pkt_fifo #(.DEPTH(BD)) u_buf (
      .clk    (clk),
      .rst_n  (rst_n),
      .push   (in_valid[i]),
      .wr_pkt (in_pkt[i]),
      .pop    (pop[i]),
      .rd_pkt (head[i]),
      .empty  (empty[i]),
      .full   (full[i]),
      .count  (unused_count)
    );

    assign route[i]     = next_hop(head[i]);
    assign in_credit[i] = pop[i];

    a_credit_respected: assert property (@(posedge clk) disable iff (!rst_n)
                                         in_valid[i] |-> (!full[i] || pop[i]));
  end

  always_comb begin
    for (int o = 0; o < NDIR; o++)
      for (int i = 0; i < NDIR; i++)
        req[o][i] = !empty[i] && (route[i] == dir_e'(o)) && can_send(dir_e'(o), head[i]);
  end

  for (genvar o = 0; o < NDIR; o++) begin : g_out
    rr_arbiter #(.N(NDIR)) u_arb (
      .clk     (clk),
      .rst_n   (rst_n),
      .req     (req[o]),
      .advance (1'b1),
      .gnt     (gnt[o])
    );
  end

  always_comb begin
    for (int i = 0; i < NDIR; i++) pop[i] = 1'b0;
    for (int o = 0; o < NDIR; o++) begin
      out_valid[o] = 1'b0;
      out_pkt[o]   = '0;
      for (int i = 0; i < NDIR; i++) begin
        if (gnt[o][i]) begin
          out_valid[o] = 1'b1;
          out_pkt[o]   = head[i];
          pop[i]       = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NDIR; o++) cred[o] <= CW'(BD);
    end else begin
      for (int o = 0; o < NDIR; o++)
        cred[o] <= cred[o] - CW'(out_valid[o]) + CW'(out_credit[o]);
    end
  end

  // Packets never leave the mesh through its top or bottom edge.
  if (ROW == 0) begin : g_top_edge
    a_no_up: assert property (@(posedge clk) disable iff (!rst_n) !out_valid[DIR_N]);
  end
  if (ROW == K - 1) begin : g_bottom_edge
    a_no_down: assert property (@(posedge clk) disable iff (!rst_n) !out_valid[DIR_S]);
  end

endmodule
