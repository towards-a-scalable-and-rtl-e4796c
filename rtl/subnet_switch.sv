// subnet_switch: one switch of a subnet's 4x4 mesh.
//
// Six ports: 0 the attached core, 1..4 the mesh neighbours north (y-1), east (x+1),
// south (y+1) and west (x-1), and 5 a direct link to the subnet hub. A packet for a core in the
// same subnet follows e-cube (dimension order, X then Y) routing. A packet for another subnet
// goes straight to the hub port. Buffering, VC allocation, arbitration and the link protocol are
// those of noc_router: 4 VCs per port, 2 flits each, wormhole switching.
//
// Straps: subnet_id (the subnet's number) and pos (the switch position y*4+x), tied to
// constants by the parent so that all switches share one design.
// Ports that lead nowhere (mesh edges) must be tied off by the parent: no valid, no ready.
// E-cube routing, the hub link, 4 VCs and 2-flit buffers follow the text; the port numbering
// is this design's choice.
module subnet_switch
  import winoc_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic  [3:0]                subnet_id,
  input  logic  [3:0]                pos,
  input  logic  [SW_NP-1:0]          in_valid,
  input  flit_t [SW_NP-1:0]          in_flit,
  output logic  [SW_NP-1:0][NVC-1:0] in_vc_ready,
  output logic  [SW_NP-1:0]          out_valid,
  output flit_t [SW_NP-1:0]          out_flit,
  input  logic  [SW_NP-1:0][NVC-1:0] out_vc_ready,
  input  logic  [SW_NP-1:0]          out_taken
);
  noc_router #(.NP(SW_NP), .ROLE(0)) u_router (
    .clk, .rst_n, .my_subnet(subnet_id), .my_local(pos), .in_valid, .in_flit, .in_vc_ready,
    .out_valid, .out_flit, .out_vc_ready, .out_taken);
endmodule
