// wb_rx: receive side of one wireless link at a wireless base station (WB).
//
// The symbols from the demodulators are put back into columns by tdm_rx and decoded by
// hpc_decoder. Each block yields up to four flits, which go into a receive FIFO of RXQ flits.
// The FIFO feeds the hub's wireless input port in order. When the FIFO holds FULL_AT flits or
// more, 'full' is raised back to the transmitter. A block already on the air can still land:
// FULL_AT leaves room for two more blocks (8 flits). The FIFO cannot overflow as long as the
// full signal reaches the transmitter within one block time.
//
// Interface: sym_valid/sym_data/sym_first from the air; out_valid/out_flit towards the hub
// input port, where a flit leaves when the hub's VC buffer for out_flit.vc has room
// (hub_vc_ready); full to the transmitter; col_fix/row_fix pulse when the product-code decoder
// corrected errors.
// Full-based flow control above a threshold, H-PC decoding and TDM follow the text. The FIFO
// size and threshold are this design's choices.
module wb_rx
  import winoc_pkg::*;
#(
  parameter int unsigned CH      = WL_CH,
  parameter int unsigned RXQ     = 16,
  parameter int unsigned FULL_AT = RXQ - 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sym_valid,
  input  logic [CH*SLOTS_PER_CYCLE-1:0] sym_data,
  input  logic                sym_first,
  output logic                out_valid,
  output flit_t               out_flit,
  input  logic [NVC-1:0]      hub_vc_ready,
  output logic                full,
  output logic                col_fix,
  output logic                row_fix
);
  localparam int unsigned AW = $clog2(RXQ);

  logic              cv, cf;
  logic [WCOL_W-1:0] cd;
  logic              dv;
  flit_t [3:0]       df;
  logic  [3:0]       dfv;

  tdm_rx #(.W(WCOL_W), .CH(CH), .SLOTS(SLOTS_PER_CYCLE)) u_tdm (
    .clk, .rst_n, .sym_valid, .sym_data, .sym_first,
    .col_valid(cv), .col_data(cd), .col_first(cf));

  hpc_decoder u_dec (
    .clk, .rst_n, .col_valid(cv), .col_first(cf), .col_data(cd),
    .out_valid(dv), .out_flit(df), .out_fv(dfv), .col_fix, .row_fix);

  flit_t       q [RXQ];
  logic [AW-1:0] rp, wp;
  logic [AW:0]   cnt;
  logic          pop;

  assign out_valid = (cnt != '0);
  assign out_flit  = q[rp];
  assign pop       = out_valid && hub_vc_ready[out_flit.vc];
  assign full      = (cnt >= (AW+1)'(FULL_AT));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rp  <= '0;
      wp  <= '0;
      cnt <= '0;
    end else begin
      automatic logic [AW-1:0] w = wp;
      automatic logic [2:0]    nw = 3'd0;
      if (dv)
        for (int j = 0; j < 4; j++)
          if (dfv[j]) begin
            q[w] <= df[j];
            w  = w + 1'b1;
            nw = nw + 3'd1;
          end
      wp  <= w;
      if (pop) rp <= rp + 1'b1;
      cnt <= cnt + (AW+1)'(nw) - (AW+1)'(pop);
    end
  end

  // the receive FIFO never overflows
  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n)
    int'(cnt) + (dv ? $countones(dfv) : 0) <= RXQ);
endmodule
