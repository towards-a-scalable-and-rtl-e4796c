// wb_tx: transmit side of one wireless link at a wireless base station (WB).
//
// The hub's wireless output port feeds flits into hpc_encoder, which assembles blocks of four
// flits into 7-column product-code blocks. tdm_tx then spreads each column over the link's
// frequency channels in 0.1 ns slots. Flow control is on/off, with the 'full' signal of the
// receiving WB. A new block only starts when rx_full is low; once started, a block is always
// finished. The flits already in the encoder's buffers wait. Flits of any VC are accepted
// while the encoder has room, so all VCs share the link in arrival order.
//
// Interface, hub side (noc_router link protocol): in_valid/in_flit, vc_ready (same for all
// VCs: the encoder can take a flit), taken. Air side: sym_valid/sym_data/sym_first towards
// the modulators; rx_full from the far receiver.
// Timing: with one channel a 43-bit column takes 11 cycles, so a block of 4 flits takes
// 77 cycles. That is the (38*7)/(32*4) = 2.08x code-rate penalty on top of the 8 cycles an
// uncoded 32-bit flit would need.
// Full-based flow control, H-PC and TDM follow the text. Stopping only at block boundaries is
// this design's choice.
module wb_tx
  import winoc_pkg::*;
#(
  parameter int unsigned CH         = WL_CH,
  parameter int unsigned FLUSH_WAIT = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  flit_t               in_flit,
  output logic [NVC-1:0]      vc_ready,
  output logic                taken,
  output logic                sym_valid,
  output logic [CH*SLOTS_PER_CYCLE-1:0] sym_data,
  output logic                sym_first,
  input  logic                rx_full
);
  logic              in_ready;
  logic              cv, cf, cr, tx_ready;
  logic [WCOL_W-1:0] cd;

  hpc_encoder #(.FLUSH_WAIT(FLUSH_WAIT)) u_enc (
    .clk, .rst_n, .in_valid, .in_flit, .in_ready,
    .col_valid(cv), .col_data(cd), .col_first(cf), .col_ready(cr));

  // hold a new block while the receiver reports full
  assign cr = tx_ready && !(cf && rx_full);

  tdm_tx #(.W(WCOL_W), .CH(CH), .SLOTS(SLOTS_PER_CYCLE)) u_tdm (
    .clk, .rst_n, .col_valid(cv && !(cf && rx_full)), .col_data(cd), .col_first(cf),
    .col_ready(tx_ready), .sym_valid, .sym_data, .sym_first);

  assign vc_ready = {NVC{in_ready}};
  assign taken    = in_valid && in_ready;
endmodule
