// hpc_encoder: Hamming product code (H-PC) encoder of a wireless link.
//
// Each flit is encoded with the (38,32) shortened Hamming code on arrival (spatial dimension);
// the coded flit, with a 5-bit sideband {valid, flit type, VC}, forms one 43-bit column. Four
// columns make a block; for every bit position of the block a (7,4) Hamming code is applied
// across the four columns (time dimension), which yields three parity columns. The block of
// 7 columns - the 4 data columns first, then the parity columns p1, p2, p3 - is then handed to
// the TDM modulator one column at a time. Since both codes are linear the parity columns are
// themselves (38,32) codewords, so every received column can be column-decoded on arrival.
//
// Two block buffers let the next block be assembled while the previous one is sent. If a block
// is partly filled and no flit has arrived for FLUSH_WAIT cycles, it is completed with empty
// columns (sideband valid = 0) so that the tail of a packet is not held back.
//
// Interface: in_valid/in_flit/in_ready (flit accepted when both high); col_valid/col_data/
// col_first/col_ready (column accepted when both high; col_first marks a block's first column).
// Latency: a full block moves to the send buffer on the clock edge after its 4th flit is stored,
// so its first column is offered two cycles after that flit was accepted.
// The codes, their sizes and the column-first structure follow the text. The sideband, its
// time-only protection, the column order and the flush rule are this design's choices.
module hpc_encoder
  import winoc_pkg::*;
#(
  parameter int unsigned FLUSH_WAIT = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  flit_t             in_flit,
  output logic              in_ready,
  output logic              col_valid,
  output logic [WCOL_W-1:0] col_data,
  output logic              col_first,
  input  logic              col_ready
);
  logic [WCOL_W-1:0] asm_q [4];
  logic [2:0]        asm_n;
  logic [$clog2(FLUSH_WAIT+1)-1:0] idle;
  logic [WCOL_W-1:0] snd_q [7];
  logic              snd_v;
  logic [2:0]        snd_i;

  logic blk_done, move, last_col;
  logic [WCOL_W-1:0] pcol [3];

  assign in_ready  = (asm_n != 3'd4);
  assign blk_done  = (asm_n == 3'd4) ||
                     (asm_n != 3'd0 && !in_valid && int'(idle) >= FLUSH_WAIT - 1);
  assign last_col  = snd_v && col_ready && snd_i == 3'd6;
  assign move      = blk_done && (!snd_v || last_col);
  assign col_valid = snd_v;
  assign col_data  = snd_q[snd_i];
  assign col_first = snd_v && snd_i == 3'd0;

  // (7,4) parity columns of the assembled block; missing flits count as empty columns
  always_comb begin
    for (int b = 0; b < WCOL_W; b++) begin
      automatic logic [3:0] d;
      automatic logic [2:0] p;
      for (int j = 0; j < 4; j++) d[j] = (j < int'(asm_n)) ? asm_q[j][b] : 1'b0;
      p = ham74_parity(d);
      pcol[0][b] = p[0];
      pcol[1][b] = p[1];
      pcol[2][b] = p[2];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      asm_n <= '0;
      idle  <= '0;
      snd_v <= 1'b0;
      snd_i <= '0;
    end else begin
      if (snd_v && col_ready) begin
        snd_i <= (snd_i == 3'd6) ? 3'd0 : snd_i + 3'd1;
        if (snd_i == 3'd6) snd_v <= 1'b0;
      end
      if (move) begin
        for (int j = 0; j < 4; j++)
          snd_q[j] <= (j < int'(asm_n)) ? asm_q[j] : '0;
        for (int j = 0; j < 3; j++) snd_q[4+j] <= pcol[j];
        snd_v <= 1'b1;
        snd_i <= '0;
        asm_n <= '0;
        idle  <= '0;
      end else if (in_valid && in_ready) begin
        asm_q[asm_n[1:0]] <= {1'b1, in_flit.ftype, in_flit.vc, ham38_encode(in_flit.data)};
        asm_n <= asm_n + 3'd1;
        idle  <= '0;
      end else if (asm_n != 3'd0 && int'(idle) < FLUSH_WAIT) begin
        idle <= idle + 1'b1;
      end
    end
  end
endmodule
