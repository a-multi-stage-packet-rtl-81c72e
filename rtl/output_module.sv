// output_module: third stage OM(j) of the Clos-UDN switch.
//
// An M x NP stage in front of NP output ports OP(j,h). Each port has its own
// output buffer, a circular queue of OQ_DEPTH packets that can absorb up to M
// packets in one time slot (one from each link LC(r,j), r = 0..M-1) and sends
// at most one packet to its output line per slot. Packets that arrive in the
// same slot for the same port are queued in increasing CM order. There is no
// scheduler: the packet header names the port.
//
// Flow control towards the central modules: space[h] is high while buffer h
// has room for a full slot's worth of arrivals (at least M free entries). It
// depends only on registered state, so the CMs can use it in the same clock.
// Timing: lc_valid is sampled on any clock (the CMs only drive it in
// slot_tick clocks); in each slot_tick clock a non-empty buffer presents its
// head on op_valid/op_pkt and drops it at the clock edge. The output line is
// assumed always able to take the packet. Buffer depth and the arrival order
// inside a slot are this design's choices; the per-port output buffers that
// accept up to M packets and send one per slot follow the switch description.
module output_module
  import clos_udn_pkg::*;
#(
  parameter int M        = 8,   // input links (one per CM)
  parameter int NP       = 8,   // output ports
  parameter int OQ_DEPTH = 512  // packets per output buffer (>= M)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          slot_tick,
  input  logic          lc_valid [M],
  input  packet_t       lc_pkt   [M],
  output logic [NP-1:0] space,
  output logic          op_valid [NP],
  output packet_t       op_pkt   [NP]
);

  localparam int PW = (OQ_DEPTH > 1) ? $clog2(OQ_DEPTH) : 1;
  localparam int CW = $clog2(OQ_DEPTH + 1);
  localparam int AW = $clog2(M + 1);

  packet_t       mem    [NP][OQ_DEPTH];
  logic [PW-1:0] wr_ptr [NP];
  logic [PW-1:0] rd_ptr [NP];
  logic [CW-1:0] count  [NP];
  logic [AW-1:0] n_arr  [NP];   // arrivals for each port this clock
  logic [PW-1:0] slot_of[M];    // buffer entry written by each link

  function automatic logic [PW-1:0] wrap_add(input logic [PW-1:0] p, input int a);
    int s;
    s = int'(p) + a;
    if (s >= OQ_DEPTH) s -= OQ_DEPTH;
    return PW'(s);
  endfunction

  // Count arrivals per port and give each arriving packet its buffer entry.
  always_comb begin
    for (int h = 0; h < NP; h++) n_arr[h] = '0;
    for (int r = 0; r < M; r++) begin
      slot_of[r] = '0;
      for (int h = 0; h < NP; h++) begin
        if (lc_valid[r] && int'(lc_pkt[r].dst_port) == h) begin
          slot_of[r] = wrap_add(wr_ptr[h], int'(n_arr[h]));
          n_arr[h]   = n_arr[h] + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int r = 0; r < M; r++)
      for (int h = 0; h < NP; h++)
        if (lc_valid[r] && int'(lc_pkt[r].dst_port) == h) mem[h][slot_of[r]] <= lc_pkt[r];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int h = 0; h < NP; h++) begin
        wr_ptr[h] <= '0;
        rd_ptr[h] <= '0;
        count[h]  <= '0;
      end
    end else begin
      for (int h = 0; h < NP; h++) begin
        wr_ptr[h] <= wrap_add(wr_ptr[h], int'(n_arr[h]));
        if (op_valid[h]) rd_ptr[h] <= wrap_add(rd_ptr[h], 1);
        count[h] <= count[h] + CW'(n_arr[h]) - CW'(op_valid[h]);
      end
    end
  end

  always_comb begin
    for (int h = 0; h < NP; h++) begin
      space[h]    = (int'(count[h]) + M <= OQ_DEPTH);
      op_valid[h] = slot_tick && (count[h] != '0);
      op_pkt[h]   = mem[h][rd_ptr[h]];
    end
  end

  for (genvar r = 0; r < M; r++) begin : g_chk_in
    a_port_range: assert property (@(posedge clk) disable iff (!rst_n)
                                   lc_valid[r] |-> int'(lc_pkt[r].dst_port) < NP);
  end
  for (genvar h = 0; h < NP; h++) begin : g_chk_q
    a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                    int'(count[h]) + int'(n_arr[h]) <= OQ_DEPTH);
  end

  initial begin
    if (OQ_DEPTH < M) $error("output_module: OQ_DEPTH must be at least M");
  end

endmodule
