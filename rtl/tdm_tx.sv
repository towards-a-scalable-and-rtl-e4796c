// tdm_tx: TDM modulator of a wireless link.
//
// A link owns CH frequency channels; each channel carries one bit per 0.1 ns time slot
// (10 Gb/s on-off keying), so one 0.4 ns network clock cycle holds SLOTS = 4 slots and the link
// moves BPC = CH*SLOTS bits per cycle. A column of W bits is cut into NSYM = ceil(W/BPC)
// symbols, sent lowest bits first. Inside a symbol, bit (t*CH + c) goes in time slot t on
// channel c, so the CH bits of one slot go out at the same time on the CH carriers. The
// electro-optic modulators that drive the antennas take sym_data one slot at a time; that
// analog part is outside this module.
//
// Interface: col_valid/col_data/col_first/col_ready (a column is taken when both valid and
// ready; ready is high when idle or during the last symbol, so columns go back to back).
// sym_valid/sym_data/sym_first out: one symbol per cycle. sym_first marks the first symbol
// of a column that had col_first set, which lets the receiver frame blocks.
// Timing: the first symbol appears the cycle after the column is taken, and a column occupies
// the link for NSYM cycles (11 cycles for a 43-bit column on one channel).
// Channel count, slot rate and nibble-per-slot splitting follow the text. The bit order and
// the framing mark are this design's choices.
module tdm_tx
  import winoc_pkg::*;
#(
  parameter int unsigned W     = WCOL_W,
  parameter int unsigned CH    = WL_CH,
  parameter int unsigned SLOTS = SLOTS_PER_CYCLE
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             col_valid,
  input  logic [W-1:0]     col_data,
  input  logic             col_first,
  output logic             col_ready,
  output logic             sym_valid,
  output logic [CH*SLOTS-1:0] sym_data,
  output logic             sym_first
);
  localparam int unsigned BPC  = CH * SLOTS;
  localparam int unsigned NSYM = (W + BPC - 1) / BPC;
  localparam int unsigned CW   = $clog2(NSYM + 1);

  logic [NSYM*BPC-1:0] sh;
  logic [CW-1:0]       rem;

  assign col_ready = (rem == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rem       <= '0;
      sym_valid <= 1'b0;
      sym_first <= 1'b0;
      sym_data  <= '0;
      sh        <= '0;
    end else begin
      sym_valid <= 1'b0;
      sym_first <= 1'b0;
      if (col_valid && col_ready) begin
        automatic logic [NSYM*BPC-1:0] c = (NSYM*BPC)'(col_data);
        sym_valid <= 1'b1;
        sym_first <= col_first;
        sym_data  <= c[BPC-1:0];
        sh        <= c >> BPC;
        rem       <= CW'(NSYM - 1);
      end else if (rem != '0) begin
        sym_valid <= 1'b1;
        sym_data  <= sh[BPC-1:0];
        sh        <= sh >> BPC;
        rem       <= rem - 1'b1;
      end
    end
  end
endmodule
