// noc_router: wormhole virtual-channel router shared by the subnet switches and the hubs.
//
// Every input port has NVC virtual channels (VCs), each a FIFO of VC_DEPTH flits. A packet's
// head flit is routed once, and then gets an output VC at the chosen port, which it keeps until
// its tail flit leaves (wormhole switching). Each cycle runs the three functional steps the
// switch is described with:
//   1. route and VC allocation: each input port offers one waiting head flit (round robin).
//      Its output port comes from e-cube routing (ROLE 0, subnet switch) or from ring routing
//      with the pre-routing block (ROLE 1, hub). Each output port hands its lowest free VC to
//      one requester (round robin).
//   2. input arbitration: each input port picks one of its VCs that holds a flit, owns an
//      output VC, and whose downstream VC buffer has room (round robin).
//   3. output arbitration and switch traversal: each output port picks one of the input ports
//      that chose it (round robin). The flit goes out that cycle with its VC field set to the
//      output VC.
// A hub rewrites a head flit as it leaves: the route fields computed by the pre-routing block
// at the source hub are written in, and 'wl_done' is set when the flit takes a wireless port.
//
// Link protocol per port, one flit per cycle:
//   in_valid/in_flit  -> stored when in_vc_ready[port][in_flit.vc] is high
//   in_vc_ready        : the VC buffer has room (registered state only)
//   out_valid/out_flit : offered only when out_vc_ready[port][vc] is high
//   out_taken          : the receiver took the flit. It may refuse (a coded wired link
//                        refuses a flit with a detected uncorrectable error); the flit then
//                        stays and is sent again.
// Timing: a head flit is routed and given an output VC in the cycle after it is written into
// its VC buffer and leaves one cycle later; a body or tail flit can leave the cycle after it is
// written. An unloaded hop thus costs two cycles for the head and one per following flit. The original switch spreads the three steps over
// three pipeline cycles; this implementation does them in one cycle (see README).
// All choices of arbitration order and VC selection are this design's own.
module noc_router
  import winoc_pkg::*;
#(
  parameter int unsigned NP        = SW_NP,
  parameter int unsigned ROLE      = 0    // 0 subnet switch, 1 hub
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic  [3:0]          my_subnet,  // subnet (switch) or hub number, a strap
  input  logic  [3:0]          my_local,   // switch position y*4+x (unused by a hub)
  input  logic  [NP-1:0]       in_valid,
  input  flit_t [NP-1:0]       in_flit,
  output logic  [NP-1:0][NVC-1:0] in_vc_ready,
  output logic  [NP-1:0]       out_valid,
  output flit_t [NP-1:0]       out_flit,
  input  logic  [NP-1:0][NVC-1:0] out_vc_ready,
  input  logic  [NP-1:0]       out_taken
);
  localparam int unsigned PW = (NP > 1) ? $clog2(NP) : 1;
  localparam int unsigned VW = $clog2(NVC);
  localparam int unsigned DW = (VC_DEPTH > 1) ? $clog2(VC_DEPTH) : 1;

  // ---------------------------------------------------------------- state
  flit_t             mem     [NP][NVC][VC_DEPTH];
  logic [DW:0]       cnt     [NP][NVC];
  logic [DW-1:0]     rdp     [NP][NVC];
  logic [DW-1:0]     wrp     [NP][NVC];
  logic              routed  [NP][NVC];
  logic [PW-1:0]     oport   [NP][NVC];
  logic [VW-1:0]     ovc     [NP][NVC];
  logic              pr_wl   [NP][NVC];   // pre-route result kept for the header rewrite
  logic [4:0]        pr_link [NP][NVC];
  logic              ov_busy [NP][NVC];
  logic [VW-1:0]     rt_ptr  [NP];        // route-offer round robin per input port
  logic [PW-1:0]     va_ptr  [NP];        // VC allocation round robin per output port
  logic [VW-1:0]     ia_ptr  [NP];        // input arbitration round robin
  logic [PW-1:0]     oa_ptr  [NP];        // output arbitration round robin

  // ---------------------------------------------------------------- head flits and requests
  flit_t          hd      [NP][NVC];
  logic [NVC-1:0] rq_req  [NP];     // unrouted head flit waiting
  logic [NVC-1:0] ia_req  [NP];     // routed flit whose downstream VC has room

  always_comb
    for (int p = 0; p < NP; p++)
      for (int v = 0; v < NVC; v++) begin
        hd[p][v]     = mem[p][v][rdp[p][v]];
        rq_req[p][v] = cnt[p][v] != '0 && !routed[p][v] && is_head(hd[p][v].ftype);
        ia_req[p][v] = cnt[p][v] != '0 && routed[p][v] && out_vc_ready[oport[p][v]][ovc[p][v]];
      end

  // ---------------------------------------------------------------- step 1: route offer
  logic              rq_v    [NP];
  logic [VW-1:0]     rq_vc   [NP];
  logic [PW-1:0]     rq_port [NP];
  logic              rq_wl   [NP];
  logic [4:0]        rq_link [NP];
  header_t           rq_hdr  [NP];
  // step 2: input arbitration
  logic              ia_v    [NP];
  logic [VW-1:0]     ia_vc   [NP];
  flit_t             sel_f   [NP];
  logic [PW-1:0]     sel_o   [NP];
  logic [VW-1:0]     sel_ovc [NP];

  for (genvar p = 0; p < NP; p++) begin : g_in
    rr_arb #(.N(NVC)) u_rq (.req(rq_req[p]), .ptr(rt_ptr[p]), .gnt_v(rq_v[p]), .gnt(rq_vc[p]));
    rr_arb #(.N(NVC)) u_ia (.req(ia_req[p]), .ptr(ia_ptr[p]), .gnt_v(ia_v[p]), .gnt(ia_vc[p]));
    always_comb begin
      rq_hdr[p]  = header_t'(hd[p][rq_vc[p]].data);
      sel_f[p]   = hd[p][ia_vc[p]];
      sel_o[p]   = oport[p][ia_vc[p]];
      sel_ovc[p] = ovc[p][ia_vc[p]];
    end
  end

  if (ROLE == 0) begin : g_sw_route
    always_comb
      for (int p = 0; p < NP; p++) begin
        rq_port[p] = PW'(route_switch(my_subnet, my_local, rq_hdr[p]));
        rq_wl[p]   = 1'b0;
        rq_link[p] = '0;
      end
  end else begin : g_hub_route
    for (genvar p = 0; p < NP; p++) begin : g_port
      logic       pw;
      logic [4:0] pl;
      logic [5:0] ph;
      header_t    h;
      hub_prerouter u_pre (
        .src_hub(my_subnet), .dst_subnet(rq_hdr[p].dst_subnet), .use_wl(pw), .link(pl), .hops(ph));
      always_comb begin
        h = rq_hdr[p];
        if (!h.routed && h.dst_subnet != my_subnet) begin
          h.use_wl  = pw;
          h.wl_link = pl;
          h.routed  = 1'b1;
        end
        rq_port[p] = PW'(route_hub(my_subnet, h));
        rq_wl[p]   = h.use_wl;
        rq_link[p] = h.wl_link;
      end
    end
  end

  // ---------------------------------------------------------------- VC allocation and
  // step 3: output arbitration + switch traversal
  logic          va_gnt [NP];   // output port o grants
  logic [PW-1:0] va_in  [NP];   // to this input port
  logic [VW-1:0] va_ovc [NP];   // this output VC
  logic [PW-1:0] oa_in  [NP];
  logic          fired  [NP];   // input port p sent a flit this cycle

  for (genvar o = 0; o < NP; o++) begin : g_out
    logic [NP-1:0] va_req, oa_req;
    logic          va_any, fv;
    always_comb begin
      fv        = 1'b0;
      va_ovc[o] = '0;
      for (int w = NVC - 1; w >= 0; w--)
        if (!ov_busy[o][w]) begin fv = 1'b1; va_ovc[o] = VW'(w); end
      for (int p = 0; p < NP; p++) begin
        va_req[p] = fv && rq_v[p] && rq_port[p] == PW'(o);
        oa_req[p] = ia_v[p] && sel_o[p] == PW'(o);
      end
    end
    rr_arb #(.N(NP)) u_va (.req(va_req), .ptr(va_ptr[o]), .gnt_v(va_any), .gnt(va_in[o]));
    rr_arb #(.N(NP)) u_oa (.req(oa_req), .ptr(oa_ptr[o]), .gnt_v(out_valid[o]), .gnt(oa_in[o]));
    assign va_gnt[o] = va_any;

    always_comb begin
      flit_t   f;
      header_t h;
      f    = sel_f[oa_in[o]];
      f.vc = sel_ovc[oa_in[o]];
      h    = header_t'(f.data);
      if (ROLE == 1 && is_head(f.ftype)) begin
        if (h.dst_subnet != my_subnet && !h.routed) begin
          h.routed  = 1'b1;
          h.use_wl  = pr_wl[oa_in[o]][ia_vc[oa_in[o]]];
          h.wl_link = pr_link[oa_in[o]][ia_vc[oa_in[o]]];
        end
        if (o >= HUB_WL0) h.wl_done = 1'b1;
        f.data = FLIT_W'(h);
      end
      out_flit[o] = f;
    end
  end

  always_comb
    for (int p = 0; p < NP; p++) begin
      fired[p] = 1'b0;
      for (int o = 0; o < NP; o++)
        if (out_valid[o] && out_taken[o] && oa_in[o] == PW'(p)) fired[p] = 1'b1;
    end

  // ---------------------------------------------------------------- input side ready
  always_comb
    for (int p = 0; p < NP; p++)
      for (int v = 0; v < NVC; v++)
        in_vc_ready[p][v] = (cnt[p][v] != (DW+1)'(VC_DEPTH));

  // ---------------------------------------------------------------- state update
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < NP; p++) begin
        for (int v = 0; v < NVC; v++) begin
          cnt[p][v]     <= '0;
          rdp[p][v]     <= '0;
          wrp[p][v]     <= '0;
          routed[p][v]  <= 1'b0;
          oport[p][v]   <= '0;
          ovc[p][v]     <= '0;
          pr_wl[p][v]   <= 1'b0;
          pr_link[p][v] <= '0;
          ov_busy[p][v] <= 1'b0;
        end
        rt_ptr[p] <= '0;
        va_ptr[p] <= '0;
        ia_ptr[p] <= '0;
        oa_ptr[p] <= '0;
      end
    end else begin
      for (int p = 0; p < NP; p++) begin
        for (int v = 0; v < NVC; v++) begin
          automatic logic pop  = fired[p] && ia_vc[p] == VW'(v);
          automatic logic push = in_valid[p] && in_flit[p].vc == VW'(v) && in_vc_ready[p][v];
          automatic logic vag  = rq_v[p] && rq_vc[p] == VW'(v) && va_gnt[rq_port[p]] &&
                                 va_in[rq_port[p]] == PW'(p);
          if (pop) begin
            rdp[p][v] <= (int'(rdp[p][v]) == VC_DEPTH - 1) ? '0 : rdp[p][v] + 1'b1;
            if (is_tail(hd[p][v].ftype)) routed[p][v] <= 1'b0;
          end
          if (vag) begin
            routed[p][v]  <= 1'b1;
            oport[p][v]   <= rq_port[p];
            ovc[p][v]     <= va_ovc[rq_port[p]];
            pr_wl[p][v]   <= rq_wl[p];
            pr_link[p][v] <= rq_link[p];
          end
          if (push) begin
            mem[p][v][wrp[p][v]] <= in_flit[p];
            wrp[p][v] <= (int'(wrp[p][v]) == VC_DEPTH - 1) ? '0 : wrp[p][v] + 1'b1;
          end
          if (push && !pop)      cnt[p][v] <= cnt[p][v] + 1'b1;
          else if (!push && pop) cnt[p][v] <= cnt[p][v] - 1'b1;
        end
        if (fired[p]) ia_ptr[p] <= VW'((int'(ia_vc[p]) + 1) % NVC);
        // the route offer moves on to the next VC whether or not it was granted
        if (rq_v[p]) rt_ptr[p] <= VW'((int'(rq_vc[p]) + 1) % NVC);
      end
      for (int o = 0; o < NP; o++) begin
        for (int w = 0; w < NVC; w++) begin
          if (out_valid[o] && out_taken[o] && out_flit[o].vc == VW'(w) && is_tail(out_flit[o].ftype))
            ov_busy[o][w] <= 1'b0;
          if (va_gnt[o] && va_ovc[o] == VW'(w))
            ov_busy[o][w] <= 1'b1;
        end
        if (out_valid[o] && out_taken[o]) oa_ptr[o] <= PW'((int'(oa_in[o]) + 1) % NP);
        if (va_gnt[o]) va_ptr[o] <= PW'((int'(va_in[o]) + 1) % NP);
      end
    end
  end

  // a flit is never offered to a VC buffer that has no room
  for (genvar o = 0; o < NP; o++) begin : g_chk
    a_ready : assert property (@(posedge clk) disable iff (!rst_n)
      out_valid[o] |-> out_vc_ready[o][out_flit[o].vc]);
  end
endmodule
