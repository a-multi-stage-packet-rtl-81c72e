// input_module: first stage IM(i) of the Clos-UDN switch.
//
// Holds one FIFO queue per input port: FIFO(i,h) stores the packets arriving
// on IP(i,h), at most one per time slot, and sends at most one per time slot,
// so it never runs faster than twice the line rate. Each FIFO has its own
// round-robin dispatch scheduler. The schedulers start at distinct link
// numbers (FIFO h starts at link h) and all advance by one at the end of every
// slot, so in every slot the M FIFOs face M distinct LI(i,r) links and never
// conflict. In the first clock of a slot, a non-empty FIFO sends its head
// packet on its selected link if the west input buffer of row i's left-most
// router in CM(r) has room. That room is tracked with one credit counter per
// link: it starts at BD, drops when a packet is sent and rises when the
// central module returns a credit (li_credit) after freeing a buffer slot.
// Without a credit the packet simply waits; the scheduler does not look for
// another link. The packet is not inspected: routing is left to the CMs.
//
// Interface: ip_valid/ip_pkt are sampled in slot_tick clocks when ip_ready is
// high (a full FIFO refuses the packet). li_valid/li_pkt are combinational
// and high only in slot_tick clocks. The FIFO depth IQ_DEPTH is this design's
// choice; the number of FIFOs, their per-port association and the dispatching
// rule follow the switch description.
module input_module
  import clos_udn_pkg::*;
#(
  parameter int M        = 8,   // FIFOs per IM = input ports per IM = CMs
  parameter int IQ_DEPTH = 64,  // depth of each FIFO(i,h)
  parameter int BD       = 4    // depth of the CM router input buffer (credits)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    slot_tick,
  input  logic    slot_end,
  // input ports IP(i,h)
  input  logic    ip_valid [M],
  input  packet_t ip_pkt   [M],
  output logic    ip_ready [M],
  // output links LI(i,r)
  output logic    li_valid [M],
  output packet_t li_pkt   [M],
  input  logic    li_credit[M]
);

  localparam int LW = (M > 1) ? $clog2(M) : 1;
  localparam int CW = $clog2(BD + 1);

  packet_t         head   [M];
  logic            empty  [M];
  logic            full   [M];
  logic            fire   [M];
  logic [LW-1:0]   sel    [M];
  logic [CW-1:0]   credit [M];

  for (genvar h = 0; h < M; h++) begin : g_fifo
    logic [$clog2(IQ_DEPTH+1)-1:0] unused_count;

    pkt_fifo #(.DEPTH(IQ_DEPTH)) u_fifo (
      .clk    (clk),
      .rst_n  (rst_n),
      .push   (ip_valid[h] && slot_tick && !full[h]),
      .wr_pkt (ip_pkt[h]),
      .pop    (fire[h]),
      .rd_pkt (head[h]),
      .empty  (empty[h]),
      .full   (full[h]),
      .count  (unused_count)
    );

    rr_dispatch_scheduler #(.M(M), .INIT(h)) u_sched (
      .clk      (clk),
      .rst_n    (rst_n),
      .slot_end (slot_end),
      .link_sel (sel[h])
    );

    assign ip_ready[h] = !full[h];
    assign fire[h]     = slot_tick && !empty[h] && (credit[sel[h]] != '0);
  end

  // Link multiplexers: link r carries the packet of the FIFO whose scheduler
  // points at r this slot.
  always_comb begin
    for (int r = 0; r < M; r++) begin
      li_valid[r] = 1'b0;
      li_pkt[r]   = '0;
    end
    for (int h = 0; h < M; h++) begin
      if (fire[h]) begin
        li_valid[sel[h]] = 1'b1;
        li_pkt[sel[h]]   = head[h];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < M; r++) credit[r] <= CW'(BD);
    end else begin
      for (int r = 0; r < M; r++)
        credit[r] <= credit[r] - CW'(li_valid[r]) + CW'(li_credit[r]);
    end
  end

  // The dispatch pointers must stay pairwise distinct (conflict-free LI links).
  for (genvar a = 0; a < M; a++) begin : g_chk_a
    for (genvar b = a + 1; b < M; b++) begin : g_chk_b
      a_distinct: assert property (@(posedge clk) disable iff (!rst_n) sel[a] != sel[b]);
    end
  end
  for (genvar r = 0; r < M; r++) begin : g_chk_cred
    a_credit_range: assert property (@(posedge clk) disable iff (!rst_n) credit[r] <= CW'(BD));
  end

endmodule
