// hub_prerouter: the pre-routing block of a hub (centralized routing at the source hub).
//
// For a packet that leaves subnet src_hub for subnet dst_subnet it finds the path with the fewest
// link traversals. The candidates are the path along the bidirectional hub ring and every path
// that uses exactly one wireless link: ring to that link's source hub, the link, then ring to
// the destination. When a wireless path and the ring path have the same length, the wireless
// one is taken because it costs less energy. Among wireless paths of equal length the
// lowest-numbered link wins. The result goes into the header flit once, at the source hub: the
// flit then follows the default ring path to the chosen link's source hub, crosses the link,
// and rides the ring again to its destination hub.
//
// Interface: combinational. src_hub (this hub's number, a strap) and dst_subnet in; use_wl, link (wireless link index) and hops (path
// length in hub-to-hub links) out. The link table is the one in winoc_pkg.
// The search and the tie rule follow the text; the lowest-index tie break between links is
// this design's choice.
module hub_prerouter
  import winoc_pkg::*;
(
  input  logic [3:0] src_hub,
  input  logic [3:0] dst_subnet,
  output logic       use_wl,
  output logic [4:0] link,
  output logic [5:0] hops
);
  preroute_t r;
  always_comb begin
    r      = preroute(src_hub, dst_subnet);
    use_wl = r.use_wl;
    link   = r.link;
    hops   = r.hops;
  end
endmodule
