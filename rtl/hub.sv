// hub: the central switch of a subnet and its node on the upper-level network.
//
// Ports 0..15 are direct links to the 16 switches of the subnet. Ports 16 and 17 are the wired
// ring links to hub hub_id+1 (clockwise) and hub hub_id-1 (counter-clockwise). Ports 18 and 19 connect
// to the wireless base station: on the output side, the transmitters of the links leaving this
// hub; on the input side, the receivers of the links arriving here.
//
// Routing: a packet for this subnet goes to the switch port of its destination core. A packet
// from the subnet bound elsewhere is pre-routed here once: the hub_prerouter finds the shortest
// path with at most one wireless hop, and the choice is written into the header. From then on
// every hub sends the packet along the shortest ring direction towards the chosen link's
// source hub, onto the link, then along the ring to the destination hub. On equal ring
// distances the packet goes clockwise. Buffering, VCs and arbitration are those of noc_router.
//
// Strap hub_id: the hub's number (0..15), tied to a constant by the parent. Unused wireless ports are tied off by the parent.
// The port set (subnet size plus two ring ports plus wireless ports) and the centralized
// routing follow the text. The clockwise tie rule and the port numbering are this design's.
module hub
  import winoc_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic  [3:0]                 hub_id,
  input  logic  [HUB_NP-1:0]          in_valid,
  input  flit_t [HUB_NP-1:0]          in_flit,
  output logic  [HUB_NP-1:0][NVC-1:0] in_vc_ready,
  output logic  [HUB_NP-1:0]          out_valid,
  output flit_t [HUB_NP-1:0]          out_flit,
  input  logic  [HUB_NP-1:0][NVC-1:0] out_vc_ready,
  input  logic  [HUB_NP-1:0]          out_taken
);
  noc_router #(.NP(HUB_NP), .ROLE(1)) u_router (
    .clk, .rst_n, .my_subnet(hub_id), .my_local(4'd0), .in_valid, .in_flit, .in_vc_ready,
    .out_valid, .out_flit, .out_vc_ready, .out_taken);
endmodule
