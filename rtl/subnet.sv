// subnet: one subnet of the hierarchical NoC, a 4x4 mesh of subnet_switch.
//
// Neighbouring switches are joined by a pair of JTEC-SQED coded wire_links, one per direction.
// Each switch exposes its core port (core_*) and its hub port (hub_*), and the parent
// connects the hub ports, through coded links, to the 16 switch ports of the subnet's hub.
// Ports on the mesh edge are tied off.
//
// Interface, per switch s (index y*4+x):
//   core_in_*  : flits injected by core s      core_out_* : flits delivered to core s
//   hub_out_*  : flits from switch s to hub     hub_in_*   : flits from the hub to switch s
// Every group follows the noc_router link protocol (valid, flit, per-VC ready, taken).
// The mesh and the hub links follow the text. The coded links inside the mesh follow the
// JTEC-SQED choice of the wireline links; their error inputs are tied to zero here.
module subnet
  import winoc_pkg::*;
(
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic  [3:0]                    subnet_id,   // strap: this subnet's number
  input  logic  [SUBNET_SZ-1:0]          core_in_valid,
  input  flit_t [SUBNET_SZ-1:0]          core_in_flit,
  output logic  [SUBNET_SZ-1:0][NVC-1:0] core_in_vc_ready,
  output logic  [SUBNET_SZ-1:0]          core_out_valid,
  output flit_t [SUBNET_SZ-1:0]          core_out_flit,
  input  logic  [SUBNET_SZ-1:0][NVC-1:0] core_out_vc_ready,
  input  logic  [SUBNET_SZ-1:0]          core_out_taken,
  output logic  [SUBNET_SZ-1:0]          hub_out_valid,
  output flit_t [SUBNET_SZ-1:0]          hub_out_flit,
  input  logic  [SUBNET_SZ-1:0][NVC-1:0] hub_out_vc_ready,
  input  logic  [SUBNET_SZ-1:0]          hub_out_taken,
  input  logic  [SUBNET_SZ-1:0]          hub_in_valid,
  input  flit_t [SUBNET_SZ-1:0]          hub_in_flit,
  output logic  [SUBNET_SZ-1:0][NVC-1:0] hub_in_vc_ready
);
  logic  [SUBNET_SZ-1:0][SW_NP-1:0]          iv, ov, ot;
  flit_t [SUBNET_SZ-1:0][SW_NP-1:0]          ifl, ofl;
  logic  [SUBNET_SZ-1:0][SW_NP-1:0][NVC-1:0] ir, orr;

  for (genvar s = 0; s < SUBNET_SZ; s++) begin : g_sw
    localparam int X = s % MESH_X;
    localparam int Y = s / MESH_X;

    subnet_switch u_sw (
      .clk, .rst_n, .subnet_id, .pos(4'(s)),
      .in_valid(iv[s]), .in_flit(ifl[s]), .in_vc_ready(ir[s]),
      .out_valid(ov[s]), .out_flit(ofl[s]), .out_vc_ready(orr[s]), .out_taken(ot[s]));

    // core port
    assign iv[s][SW_CORE]    = core_in_valid[s];
    assign ifl[s][SW_CORE]   = core_in_flit[s];
    assign core_in_vc_ready[s] = ir[s][SW_CORE];
    assign core_out_valid[s] = ov[s][SW_CORE];
    assign core_out_flit[s]  = ofl[s][SW_CORE];
    assign orr[s][SW_CORE]   = core_out_vc_ready[s];
    assign ot[s][SW_CORE]    = core_out_taken[s];
    // hub port
    assign iv[s][SW_HUB]     = hub_in_valid[s];
    assign ifl[s][SW_HUB]    = hub_in_flit[s];
    assign hub_in_vc_ready[s] = ir[s][SW_HUB];
    assign hub_out_valid[s]  = ov[s][SW_HUB];
    assign hub_out_flit[s]   = ofl[s][SW_HUB];
    assign orr[s][SW_HUB]    = hub_out_vc_ready[s];
    assign ot[s][SW_HUB]     = hub_out_taken[s];

    // mesh links leaving switch s; the receiving side of a missing neighbour is tied off
    for (genvar d = SW_N; d <= SW_W; d++) begin : g_dir
      localparam int NX = (d == SW_E) ? X + 1 : (d == SW_W) ? X - 1 : X;
      localparam int NY = (d == SW_S) ? Y + 1 : (d == SW_N) ? Y - 1 : Y;
      localparam int OPP = (d == SW_N) ? SW_S : (d == SW_S) ? SW_N : (d == SW_E) ? SW_W : SW_E;
      if (NX >= 0 && NX < MESH_X && NY >= 0 && NY < MESH_Y) begin : g_link
        localparam int N = NY * MESH_X + NX;
        wire_link u_link (
          .up_valid(ov[s][d]), .up_flit(ofl[s][d]), .up_vc_ready(orr[s][d]), .up_taken(ot[s][d]),
          .dn_valid(iv[N][OPP]), .dn_flit(ifl[N][OPP]), .dn_vc_ready(ir[N][OPP]),
          .err('0), .corrected(), .retry());
      end else begin : g_edge
        assign orr[s][d] = '0;
        assign ot[s][d]  = 1'b0;
        assign iv[s][d]  = 1'b0;
        assign ifl[s][d] = '0;
      end
    end
  end
endmodule
