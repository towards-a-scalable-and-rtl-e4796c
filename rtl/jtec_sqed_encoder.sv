// jtec_sqed_encoder: JTEC-SQED encoder for a 32-bit wired link (78 wires).
//
// The flit is first encoded with the (39,32) Hsiao SEC-DED code (7 check bits, each the XOR
// of 13 or 14 data bits, so there is no 38-input overall parity chain). The 39-bit word is then
// sent twice. Copy A goes on the even wires and copy B on the odd wires, so every wire runs
// next to its own duplicate. Two neighbours of a wire therefore never switch against it in
// opposite directions, which brings the worst-case coupling from (1+4λ)C_L to (1+2λ)C_L.
// The two Hsiao copies are 8 apart in Hamming distance. That is enough to correct any 3 errors
// and detect any 4.
//
// Interface: purely combinational, d[31:0] in, w[77:0] out; w[2i] = A[i], w[2i+1] = B[i].
// Duplication and the Hsiao code follow the text; the interleaved wire order and the Hsiao
// column set are this design's choice.
module jtec_sqed_encoder
  import winoc_pkg::*;
(
  input  logic [31:0] d,
  output logic [77:0] w
);
  logic [38:0] cw;

  always_comb begin
    cw = hsiao_encode(d);
    for (int i = 0; i < 39; i++) begin
      w[2*i]   = cw[i];
      w[2*i+1] = cw[i];
    end
  end
endmodule
