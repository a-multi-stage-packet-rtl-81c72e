// clos_udn_switch: N x N three-stage Clos packet switch whose middle stage is
// made of unidirectional NoC (UDN) fabrics.
//
// Structure (N = K * N_PORT ports, expansion factor m/n = 1, so M_CM = N_PORT):
//   * K input modules IM(i), each with one FIFO per input port and one
//     round-robin dispatch scheduler per FIFO (input_module);
//   * M_CM central modules CM(r), each a K x DEPTH_M mesh of small
//     input-queued routers (udn_cm);
//   * K output modules OM(j), each with one output buffer per port
//     (output_module).
// Link LI(i,r) joins IM(i) to row i of CM(r); link LC(r,j) joins row j of
// CM(r) to OM(j). Every packet of IM(i) may cross any CM: the dispatch
// pointers of an IM are kept distinct and rotate every slot, so the IM spreads
// its traffic over all CMs without any IM-CM matching. Inside a CM the routers
// forward packets hop by hop towards row j, arbitrating locally, and OM(j)
// queues each packet at the port named in its header.
//
// Timing: one clock is one NoC fabric cycle. A time slot is SP clocks
// (slot_timer); input ports, LI links, LC links and output ports move at most
// one packet per slot, in the slot's first clock (slot_tick high), while the
// CM routers move one hop per clock, i.e. they run SP times faster.
// Ports are flattened as index i * N_PORT + h for IP(i,h) and OP(j,h).
// ip_valid/ip_pkt are taken in a slot_tick clock when ip_ready is high.
// op_valid/op_pkt are valid for that clock only.
// Packets of one flow may leave out of order (different CMs), as with the
// dynamic dispatching scheme the switch is built around.
// Default sizes: 64 x 64 switch (K = N_PORT = 8), full mesh depth, router
// buffer depth 4 and speedup 2 follow the evaluated configuration; the FIFO
// and output buffer depths are this design's choice.
module clos_udn_switch
  import clos_udn_pkg::*;
#(
  parameter int K        = 8,          // input / output modules
  parameter int N_PORT   = 8,          // ports per IM and OM (n); also CMs (m = n)
  parameter int DEPTH_M  = K,          // mesh depth of each CM (M)
  parameter int BD       = 4,          // NoC router buffer depth
  parameter int SP       = 2,          // NoC speedup (clocks per time slot)
  parameter int IQ_DEPTH = 64,         // IM FIFO depth
  parameter int OQ_DEPTH = 512,        // OM output buffer depth
  localparam int N       = K * N_PORT, // switch size
  localparam int M_CM    = N_PORT      // central modules
) (
  input  logic    clk,
  input  logic    rst_n,
  output logic    slot_tick,
  input  logic    ip_valid [N],
  input  packet_t ip_pkt   [N],
  output logic    ip_ready [N],
  output logic    op_valid [N],
  output packet_t op_pkt   [N]
);

  logic slot_end;

  // LI(i,r): IM i -> CM r.  LC(r,j): CM r -> OM j.
  logic          li_v  [K][M_CM];
  packet_t       li_p  [K][M_CM];
  logic          li_c  [K][M_CM];
  logic          lc_v  [M_CM][K];
  packet_t       lc_p  [M_CM][K];
  logic [N_PORT-1:0] om_space [K];

  slot_timer #(.SP(SP)) u_slot (
    .clk       (clk),
    .rst_n     (rst_n),
    .slot_tick (slot_tick),
    .slot_end  (slot_end)
  );

  for (genvar i = 0; i < K; i++) begin : g_im
    logic    v_in  [N_PORT];
    packet_t p_in  [N_PORT];
    logic    rdy   [N_PORT];
    logic    lv    [M_CM];
    packet_t lp    [M_CM];
    logic    lc    [M_CM];

    for (genvar h = 0; h < N_PORT; h++) begin : g_port
      assign v_in[h]              = ip_valid[i*N_PORT + h];
      assign p_in[h]              = ip_pkt[i*N_PORT + h];
      assign ip_ready[i*N_PORT+h] = rdy[h];
    end
    for (genvar r = 0; r < M_CM; r++) begin : g_link
      assign li_v[i][r] = lv[r];
      assign li_p[i][r] = lp[r];
      assign lc[r]      = li_c[i][r];
    end

    input_module #(.M(M_CM), .IQ_DEPTH(IQ_DEPTH), .BD(BD)) u_im (
      .clk       (clk),
      .rst_n     (rst_n),
      .slot_tick (slot_tick),
      .slot_end  (slot_end),
      .ip_valid  (v_in),
      .ip_pkt    (p_in),
      .ip_ready  (rdy),
      .li_valid  (lv),
      .li_pkt    (lp),
      .li_credit (lc)
    );
  end

  for (genvar r = 0; r < M_CM; r++) begin : g_cm
    logic    iv  [K];
    packet_t ipk [K];
    logic    ic  [K];
    logic    ov  [K];
    packet_t opk [K];

    for (genvar i = 0; i < K; i++) begin : g_row
      assign iv[i]      = li_v[i][r];
      assign ipk[i]     = li_p[i][r];
      assign li_c[i][r] = ic[i];
      assign lc_v[r][i] = ov[i];
      assign lc_p[r][i] = opk[i];
    end

    udn_cm #(.K(K), .DEPTH_M(DEPTH_M), .BD(BD), .NP(N_PORT)) u_cm (
      .clk       (clk),
      .rst_n     (rst_n),
      .slot_tick (slot_tick),
      .li_valid  (iv),
      .li_pkt    (ipk),
      .li_credit (ic),
      .lc_valid  (ov),
      .lc_pkt    (opk),
      .lc_space  (om_space)
    );
  end

  for (genvar j = 0; j < K; j++) begin : g_om
    logic    lv [M_CM];
    packet_t lp [M_CM];
    logic    ov [N_PORT];
    packet_t op [N_PORT];

    for (genvar r = 0; r < M_CM; r++) begin : g_link
      assign lv[r] = lc_v[r][j];
      assign lp[r] = lc_p[r][j];
    end
    for (genvar h = 0; h < N_PORT; h++) begin : g_port
      assign op_valid[j*N_PORT + h] = ov[h];
      assign op_pkt[j*N_PORT + h]   = op[h];
    end

    output_module #(.M(M_CM), .NP(N_PORT), .OQ_DEPTH(OQ_DEPTH)) u_om (
      .clk       (clk),
      .rst_n     (rst_n),
      .slot_tick (slot_tick),
      .lc_valid  (lv),
      .lc_pkt    (lp),
      .space     (om_space[j]),
      .op_valid  (ov),
      .op_pkt    (op)
    );
  end

endmodule
