// tdm_rx: TDM demodulator of a wireless link.
//
// It collects NSYM symbols of BPC = CH*SLOTS bits (CH channels, SLOTS time slots per cycle)
// into a column of W bits, in the order tdm_tx sends them. A symbol marked sym_first starts a
// new block: it resets the symbol count, and the column it opens is delivered with col_first
// set. This resynchronises the receiver on every block.
//
// Interface: sym_valid/sym_data/sym_first in, one symbol per cycle; col_valid/col_data/
// col_first out, a one-cycle pulse the cycle after the column's last symbol.
// Slot and channel organisation follow the text; the framing is this design's choice.
module tdm_rx
  import winoc_pkg::*;
#(
  parameter int unsigned W     = WCOL_W,
  parameter int unsigned CH    = WL_CH,
  parameter int unsigned SLOTS = SLOTS_PER_CYCLE
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sym_valid,
  input  logic [CH*SLOTS-1:0] sym_data,
  input  logic                sym_first,
  output logic                col_valid,
  output logic [W-1:0]        col_data,
  output logic                col_first
);
  localparam int unsigned BPC  = CH * SLOTS;
  localparam int unsigned NSYM = (W + BPC - 1) / BPC;
  localparam int unsigned CW   = $clog2(NSYM + 1);

  logic [NSYM*BPC-1:0] sh;
  logic [CW-1:0]       n;
  logic                first_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n         <= '0;
      first_q   <= 1'b0;
      col_valid <= 1'b0;
      col_first <= 1'b0;
      col_data  <= '0;
      sh        <= '0;
    end else begin
      col_valid <= 1'b0;
      col_first <= 1'b0;
      if (sym_valid) begin
        automatic logic [CW-1:0] k = sym_first ? '0 : n;
        automatic logic [NSYM*BPC-1:0] s = {sym_data, sh[NSYM*BPC-1:BPC]};
        automatic logic f = sym_first ? 1'b1 : first_q;
        sh <= s;
        if (int'(k) == NSYM - 1) begin
          col_valid <= 1'b1;
          col_first <= f;
          col_data  <= s[W-1:0];
          n         <= '0;
          first_q   <= 1'b0;
        end else begin
          n       <= k + 1'b1;
          first_q <= f;
        end
      end
    end
  end
endmodule
