// udn_cm: central module CM(r), a unidirectional NoC (UDN) crossbar fabric.
//
// A K-row by DEPTH_M-column mesh of noc_router instances replaces the
// single-hop crossbar of a conventional Clos middle stage. Row i's left-most
// router takes packets from the link LI(i,r) of input module IM(i); row j's
// right-most router drives the link LC(r,j) to output module OM(j). Inside the
// mesh packets flow east and vertically only, one hop per clock, with routing,
// round-robin arbitration and credit flow control done locally in every
// router, so contention for the LC links is absorbed in the router buffers
// without any central scheduler.
//
// Interface and timing: li_valid/li_pkt are written into the west buffer of
// row i, column 0; li_credit[i] pulses when that buffer frees a slot (the
// input module counts these as credits, BD at reset). The routers run on every
// clock, i.e. SP times per time slot. An LC link carries at most one packet
// per time slot: lc_valid can only be high in a slot_tick clock, and only for
// a packet whose output-port buffer in OM(j) reported room (lc_space[j][h]).
// The mesh size follows the switch description (K x K, full depth M = K by
// default); which mesh row each LI and LC link attaches to follows the
// switch's block diagram.
module udn_cm
  import clos_udn_pkg::*;
#(
  parameter int K       = 8,   // rows: IMs feeding, and OMs fed by, this CM
  parameter int DEPTH_M = 8,   // mesh depth (columns)
  parameter int BD      = 4,   // router buffer depth
  parameter int NP      = 8    // output ports per OM
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          slot_tick,
  // LI(i,r) links from the input modules
  input  logic          li_valid  [K],
  input  packet_t       li_pkt    [K],
  output logic          li_credit [K],
  // LC(r,j) links to the output modules
  output logic          lc_valid  [K],
  output packet_t       lc_pkt    [K],
  input  logic [NP-1:0] lc_space  [K]
);

  logic    iv [K][DEPTH_M][NDIR];
  packet_t ip [K][DEPTH_M][NDIR];
  logic    ic [K][DEPTH_M][NDIR];
  logic    ov [K][DEPTH_M][NDIR];
  packet_t op [K][DEPTH_M][NDIR];
  logic    oc [K][DEPTH_M][NDIR];

  for (genvar y = 0; y < K; y++) begin : g_row
    for (genvar x = 0; x < DEPTH_M; x++) begin : g_col
      logic    r_iv [NDIR];
      packet_t r_ip [NDIR];
      logic    r_ic [NDIR];
      logic    r_ov [NDIR];
      packet_t r_op [NDIR];
      logic    r_oc [NDIR];

      for (genvar d = 0; d < NDIR; d++) begin : g_dir
        assign r_iv[d]     = iv[y][x][d];
        assign r_ip[d]     = ip[y][x][d];
        assign ic[y][x][d] = r_ic[d];
        assign ov[y][x][d] = r_ov[d];
        assign op[y][x][d] = r_op[d];
        assign r_oc[d]     = oc[y][x][d];
      end

      noc_router #(
        .ROW(y), .COL(x), .K(K), .DEPTH_M(DEPTH_M), .BD(BD), .NP(NP)
      ) u_router (
        .clk        (clk),
        .rst_n      (rst_n),
        .in_valid   (r_iv),
        .in_pkt     (r_ip),
        .in_credit  (r_ic),
        .out_valid  (r_ov),
        .out_pkt    (r_op),
        .out_credit (r_oc),
        .east_ok    ((x == DEPTH_M - 1 && slot_tick) ? lc_space[y] : '0)
      );

      // west input: LI link or the router to the left
      if (x == 0) begin : g_w_edge
        assign iv[y][x][DIR_E] = li_valid[y];
        assign ip[y][x][DIR_E] = li_pkt[y];
        assign li_credit[y]    = ic[y][x][DIR_E];
      end else begin : g_w_link
        assign iv[y][x][DIR_E] = ov[y][x-1][DIR_E];
        assign ip[y][x][DIR_E] = op[y][x-1][DIR_E];
      end

      // east output: LC link or the router to the right
      if (x == DEPTH_M - 1) begin : g_e_edge
        assign lc_valid[y]     = ov[y][x][DIR_E];
        assign lc_pkt[y]       = op[y][x][DIR_E];
        assign oc[y][x][DIR_E] = 1'b0;
      end else begin : g_e_link
        assign oc[y][x][DIR_E] = ic[y][x+1][DIR_E];
      end

      // input from above (packets going down) and credit for the up output
      if (y == 0) begin : g_n_edge
        assign iv[y][x][DIR_N] = 1'b0;
        assign ip[y][x][DIR_N] = '0;
        assign oc[y][x][DIR_N] = 1'b0;
      end else begin : g_n_link
        assign iv[y][x][DIR_N] = ov[y-1][x][DIR_S];
        assign ip[y][x][DIR_N] = op[y-1][x][DIR_S];
        assign oc[y][x][DIR_N] = ic[y-1][x][DIR_S];
      end

      // input from below (packets going up) and credit for the down output
      if (y == K - 1) begin : g_s_edge
        assign iv[y][x][DIR_S] = 1'b0;
        assign ip[y][x][DIR_S] = '0;
        assign oc[y][x][DIR_S] = 1'b0;
      end else begin : g_s_link
        assign iv[y][x][DIR_S] = ov[y+1][x][DIR_N];
        assign ip[y][x][DIR_S] = op[y+1][x][DIR_N];
        assign oc[y][x][DIR_S] = ic[y+1][x][DIR_N];
      end
    end
  end

  for (genvar j = 0; j < K; j++) begin : g_chk
    a_lc_in_slot: assert property (@(posedge clk) disable iff (!rst_n) lc_valid[j] |-> slot_tick);
    a_lc_dest:    assert property (@(posedge clk) disable iff (!rst_n)
                                   lc_valid[j] |-> int'(lc_pkt[j].dst_om) == j);
  end

endmodule
