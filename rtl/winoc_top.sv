// winoc_top: the complete 256-core hierarchical wireless network-on-chip.
//
// The cores are grouped into NSUBNET = 16 subnets of 16. Inside a subnet, switches in a 4x4
// mesh route by e-cube routing, and every switch has a direct link to the subnet's hub. The 16
// hubs make up the upper level: a bidirectional wired ring plus 24 one-way wireless links
// placed as long-range shortcuts, which gives the hub network small-world character. A packet
// for another subnet goes from its switch to the local hub, where the pre-routing block picks
// the shortest path with at most one wireless link. The packet then rides the ring to that
// link's wireless base station, crosses the link, rides the ring to the destination hub and
// enters the destination subnet. Every wired link (mesh, switch-hub, ring) carries
// JTEC-SQED coded flits. Every wireless link carries Hamming product-code blocks, time-division
// multiplexed over its frequency channels.
//
// Ports:
//   core_in_*   : flit injection of each core (valid, flit, per-VC ready). A flit is taken
//                 when valid and the ready bit of its VC are both high.
//   core_out_*  : flit delivery to each core; a flit leaves when the core's ready bit for its
//                 VC is high.
//   wl_tx_*     : the symbols each wireless link transmitter hands to its electro-optic
//                 modulators (one symbol = CH channels x 4 slots per cycle) and the 'full'
//                 signal it receives back.
//   wl_rx_*     : the symbols each wireless receiver gets from its demodulators, and its 'full'.
//   wl_col_fix/wl_row_fix : the product-code decoder of a link corrected errors.
//   ring_err/ring_fix/ring_retry : test access to the clockwise ring links. ring_err bits are
//                 XORed onto the 78 coded wires of that link (tie to zero in normal use).
//                 ring_fix reports a flit that arrived corrected, ring_retry a flit refused
//                 because the decoder detected an uncorrectable pattern.
// Timing: an unloaded switch or hub hop takes two cycles for a head flit; a wireless hop costs
// 77 cycles per block of four flits with one channel per link.
// The antennas, modulators and the optical channel lie outside this module. Link k is closed
// by connecting wl_tx_*[k] to wl_rx_*[k] and wl_rx_full[k] to wl_tx_full[k].
// The structure follows the text; the link placement is this design's (see winoc_pkg).
module winoc_top
  import winoc_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic  [NCORE-1:0]         core_in_valid,
  input  flit_t [NCORE-1:0]         core_in_flit,
  output logic  [NCORE-1:0][NVC-1:0] core_in_vc_ready,
  output logic  [NCORE-1:0]         core_out_valid,
  output flit_t [NCORE-1:0]         core_out_flit,
  input  logic  [NCORE-1:0][NVC-1:0] core_out_vc_ready,
  output logic  [NWL-1:0]           wl_tx_sym_valid,
  output logic  [NWL-1:0][WL_CH*SLOTS_PER_CYCLE-1:0] wl_tx_sym_data,
  output logic  [NWL-1:0]           wl_tx_sym_first,
  input  logic  [NWL-1:0]           wl_tx_full,
  input  logic  [NWL-1:0]           wl_rx_sym_valid,
  input  logic  [NWL-1:0][WL_CH*SLOTS_PER_CYCLE-1:0] wl_rx_sym_data,
  input  logic  [NWL-1:0]           wl_rx_sym_first,
  output logic  [NWL-1:0]           wl_rx_full,
  output logic  [NWL-1:0]           wl_col_fix,
  output logic  [NWL-1:0]           wl_row_fix,
  // test access to the clockwise ring links: bit flips XORed onto the 78 wires (tie to zero)
  // and per-link flags for a flit corrected and a flit refused for retransmission
  input  logic  [NSUBNET-1:0][77:0] ring_err,
  output logic  [NSUBNET-1:0]       ring_fix,
  output logic  [NSUBNET-1:0]       ring_retry
);
  // hub port signals
  logic  [NSUBNET-1:0][HUB_NP-1:0]          h_iv, h_ov, h_ot;
  flit_t [NSUBNET-1:0][HUB_NP-1:0]          h_if, h_of;
  logic  [NSUBNET-1:0][HUB_NP-1:0][NVC-1:0] h_ir, h_or;

  for (genvar s = 0; s < NSUBNET; s++) begin : g_sub
    localparam logic [3:0] NEXT = 4'((s + 1) % NSUBNET);
    localparam logic [3:0] PREV = 4'((s + NSUBNET - 1) % NSUBNET);

    logic  [SUBNET_SZ-1:0]          s_hov, s_hot, s_hiv;
    flit_t [SUBNET_SZ-1:0]          s_hof, s_hif;
    logic  [SUBNET_SZ-1:0][NVC-1:0] s_hor, s_hir;
    logic  [SUBNET_SZ-1:0]          c_ov, c_ot;
    flit_t [SUBNET_SZ-1:0]          c_of;

    subnet u_subnet (
      .clk, .rst_n, .subnet_id(4'(s)),
      .core_in_valid(core_in_valid[s*SUBNET_SZ +: SUBNET_SZ]),
      .core_in_flit(core_in_flit[s*SUBNET_SZ +: SUBNET_SZ]),
      .core_in_vc_ready(core_in_vc_ready[s*SUBNET_SZ +: SUBNET_SZ]),
      .core_out_valid(c_ov), .core_out_flit(c_of),
      .core_out_vc_ready(core_out_vc_ready[s*SUBNET_SZ +: SUBNET_SZ]),
      .core_out_taken(c_ot),
      .hub_out_valid(s_hov), .hub_out_flit(s_hof), .hub_out_vc_ready(s_hor), .hub_out_taken(s_hot),
      .hub_in_valid(s_hiv), .hub_in_flit(s_hif), .hub_in_vc_ready(s_hir));

    for (genvar c = 0; c < SUBNET_SZ; c++) begin : g_core
      assign core_out_valid[s*SUBNET_SZ + c] = c_ov[c];
      assign core_out_flit[s*SUBNET_SZ + c]  = c_of[c];
      assign c_ot[c] = c_ov[c] && core_out_vc_ready[s*SUBNET_SZ + c][c_of[c].vc];

      // switch c -> hub port c
      wire_link u_up (
        .up_valid(s_hov[c]), .up_flit(s_hof[c]), .up_vc_ready(s_hor[c]), .up_taken(s_hot[c]),
        .dn_valid(h_iv[s][c]), .dn_flit(h_if[s][c]), .dn_vc_ready(h_ir[s][c]),
        .err('0), .corrected(), .retry());
      // hub port c -> switch c
      wire_link u_down (
        .up_valid(h_ov[s][c]), .up_flit(h_of[s][c]), .up_vc_ready(h_or[s][c]), .up_taken(h_ot[s][c]),
        .dn_valid(s_hiv[c]), .dn_flit(s_hif[c]), .dn_vc_ready(s_hir[c]),
        .err('0), .corrected(), .retry());
    end

    hub u_hub (
      .clk, .rst_n, .hub_id(4'(s)),
      .in_valid(h_iv[s]), .in_flit(h_if[s]), .in_vc_ready(h_ir[s]),
      .out_valid(h_ov[s]), .out_flit(h_of[s]), .out_vc_ready(h_or[s]), .out_taken(h_ot[s]));

    // ring: clockwise output of hub s enters hub s+1 on its counter-clockwise port, and back
    logic cw_corr;
    wire_link u_ring_cw (
      .up_valid(h_ov[s][HUB_CW]), .up_flit(h_of[s][HUB_CW]), .up_vc_ready(h_or[s][HUB_CW]),
      .up_taken(h_ot[s][HUB_CW]),
      .dn_valid(h_iv[NEXT][HUB_CCW]), .dn_flit(h_if[NEXT][HUB_CCW]), .dn_vc_ready(h_ir[NEXT][HUB_CCW]),
      .err(ring_err[s]), .corrected(cw_corr), .retry(ring_retry[s]));
    assign ring_fix[s] = cw_corr && h_ov[s][HUB_CW];
    wire_link u_ring_ccw (
      .up_valid(h_ov[s][HUB_CCW]), .up_flit(h_of[s][HUB_CCW]), .up_vc_ready(h_or[s][HUB_CCW]),
      .up_taken(h_ot[s][HUB_CCW]),
      .dn_valid(h_iv[PREV][HUB_CW]), .dn_flit(h_if[PREV][HUB_CW]), .dn_vc_ready(h_ir[PREV][HUB_CW]),
      .err('0), .corrected(), .retry());

    // wireless ports of hub s
    for (genvar w = 0; w < WL_PORTS; w++) begin : g_wl
      localparam int unsigned KO = wl_link_out(s, w);
      localparam int unsigned KI = wl_link_in(s, w);
      if (KO < NWL) begin : g_tx
        wb_tx u_tx (
          .clk, .rst_n,
          .in_valid(h_ov[s][HUB_WL0 + w]), .in_flit(h_of[s][HUB_WL0 + w]),
          .vc_ready(h_or[s][HUB_WL0 + w]), .taken(h_ot[s][HUB_WL0 + w]),
          .sym_valid(wl_tx_sym_valid[KO]), .sym_data(wl_tx_sym_data[KO]),
          .sym_first(wl_tx_sym_first[KO]), .rx_full(wl_tx_full[KO]));
      end else begin : g_no_tx
        assign h_or[s][HUB_WL0 + w] = '0;
        assign h_ot[s][HUB_WL0 + w] = 1'b0;
      end
      if (KI < NWL) begin : g_rx
        wb_rx u_rx (
          .clk, .rst_n,
          .sym_valid(wl_rx_sym_valid[KI]), .sym_data(wl_rx_sym_data[KI]),
          .sym_first(wl_rx_sym_first[KI]),
          .out_valid(h_iv[s][HUB_WL0 + w]), .out_flit(h_if[s][HUB_WL0 + w]),
          .hub_vc_ready(h_ir[s][HUB_WL0 + w]), .full(wl_rx_full[KI]),
          .col_fix(wl_col_fix[KI]), .row_fix(wl_row_fix[KI]));
      end else begin : g_no_rx
        assign h_iv[s][HUB_WL0 + w] = 1'b0;
        assign h_if[s][HUB_WL0 + w] = '0;
      end
    end
  end
endmodule
