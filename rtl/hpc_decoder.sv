// hpc_decoder: column-first decoder of the Hamming product code of a wireless link.
//
// Each 43-bit column is (38,32) Hamming decoded as it arrives: a single error in the column
// is corrected. The column's 32 data bits and its 5 sideband bits are kept. After the 7th
// column of a block, 37 parallel (7,4) Hamming decoders correct each bit position across the
// block (row decoding) and give back the 4 flits. Column decoding removes scattered random
// errors. Row decoding removes what is left of a burst: for example every bit of one column
// hit by a failing antenna, or any error pattern with at most one error per row after column
// decoding. The smallest pattern that cannot be corrected is four errors at the corners of a
// rectangle.
//
// Interface: col_valid/col_first/col_data in (always accepted; col_first restarts the block).
// out_valid pulses for one cycle, the cycle after the block's 7th column, with out_flit[0..3]
// and out_fv[j] (flit j is a real flit, not padding). col_fix/row_fix pulse when the column or
// row stage changed a bit.
// Column-first order, the code sizes and the per-flit column decoding follow the text. The
// sideband and the output framing are this design's choices.
module hpc_decoder
  import winoc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              col_valid,
  input  logic              col_first,
  input  logic [WCOL_W-1:0] col_data,
  output logic              out_valid,
  output flit_t [3:0]       out_flit,
  output logic  [3:0]       out_fv,
  output logic              col_fix,
  output logic              row_fix
);
  localparam int unsigned RW = FLIT_W + WSB_W;   // bits kept per column

  logic [RW-1:0] cb [7];
  logic [2:0]    idx;
  logic [37:0]   cfix;
  logic [RW-1:0] ccol;
  logic          last;

  always_comb begin
    cfix = ham38_correct(col_data[37:0]);
    ccol = {col_data[WCOL_W-1:38], ham38_data(cfix)};
    last = col_valid && (col_first ? 3'd0 : idx) == 3'd6;
  end

  // row decoding over the stored 6 columns and the arriving 7th
  logic [RW-1:0] rows [4];
  logic          rfix;
  always_comb begin
    rfix = 1'b0;
    for (int b = 0; b < RW; b++) begin
      automatic logic [3:0] d = {cb[3][b], cb[2][b], cb[1][b], cb[0][b]};
      automatic logic [2:0] p = {ccol[b], cb[5][b], cb[4][b]};
      automatic logic [3:0] c = ham74_correct(d, p);
      for (int j = 0; j < 4; j++) rows[j][b] = c[j];
      if (c != d || (p ^ ham74_parity(d)) != 3'd0) rfix = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      idx       <= '0;
      out_valid <= 1'b0;
      col_fix   <= 1'b0;
      row_fix   <= 1'b0;
      out_fv    <= '0;
    end else begin
      out_valid <= 1'b0;
      row_fix   <= 1'b0;
      col_fix   <= col_valid && (cfix != col_data[37:0]);
      if (col_valid) begin
        automatic logic [2:0] i = col_first ? 3'd0 : idx;
        cb[i] <= ccol;
        idx   <= (i == 3'd6) ? 3'd0 : i + 3'd1;
        if (last) begin
          out_valid <= 1'b1;
          row_fix   <= rfix;
          for (int j = 0; j < 4; j++) begin
            out_fv[j]         <= rows[j][RW-1];
            out_flit[j].ftype <= ftype_e'(rows[j][RW-2 -: 2]);
            out_flit[j].vc    <= rows[j][RW-4 -: 2];
            out_flit[j].data  <= rows[j][FLIT_W-1:0];
          end
        end
      end
    end
  end
endmodule
