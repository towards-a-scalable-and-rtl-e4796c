// jtec_sqed_decoder: JTEC-SQED decoder for a 78-wire coded link.
//
// The two Hsiao (39,32) copies A (even wires) and B (odd wires) are split apart. Each gets a
// syndrome, and the syndrome is classed as zero, odd weight (one or three errors) or even
// weight (two errors). Each copy is also single-error corrected on its own. Then:
//   * A syndrome zero              -> output A
//   * A even (A has two errors)    -> output corrected B (B has at most one)
//   * A odd, B zero                -> output B
//   * A odd, B even                -> output corrected A
//   * A odd, B odd                 -> both corrected copies must agree
// Any pattern of up to three errors is corrected. A four-error pattern sets 'uncorrectable'
// (the quadruple error detection, SQED), and the output must then be thrown away. The patterns
// that set it are: both syndromes even; both odd with corrected copies that disagree or a
// syndrome that matches no column; both zero with copies that differ.
// 'corrected' is set when any wire was wrong.
//
// Interface: combinational, w[77:0] in, d[31:0], corrected, uncorrectable out.
// The decision rules follow the optimized JTEC flow and the SQED cases of the text. Deriving
// them from syndrome weight classes is this design's formulation.
module jtec_sqed_decoder
  import winoc_pkg::*;
(
  input  logic [77:0] w,
  output logic [31:0] d,
  output logic        corrected,
  output logic        uncorrectable
);
  logic [38:0] a, b;
  logic [6:0]  sa, sb;
  sec_result_t ca, cb;
  logic za, zb, oa, ob;

  always_comb begin
    for (int i = 0; i < 39; i++) begin
      a[i] = w[2*i];
      b[i] = w[2*i+1];
    end
    sa = hsiao_syndrome(a);
    sb = hsiao_syndrome(b);
    ca = hsiao_correct(a, sa);
    cb = hsiao_correct(b, sb);
    za = (sa == 7'd0);
    zb = (sb == 7'd0);
    oa = sa[0] ^ sa[1] ^ sa[2] ^ sa[3] ^ sa[4] ^ sa[5] ^ sa[6];
    ob = sb[0] ^ sb[1] ^ sb[2] ^ sb[3] ^ sb[4] ^ sb[5] ^ sb[6];
    corrected     = (a != b) || !za;
    uncorrectable = 1'b0;
    if (za) begin
      d = a[31:0];
      uncorrectable = zb && (a != b);
    end else if (!oa) begin
      d = cb.data;
      uncorrectable = !zb && !ob;
    end else if (zb) begin
      d = b[31:0];
    end else if (!ob) begin
      d = ca.data;
    end else begin
      d = ca.data;
      uncorrectable = !ca.ok || !cb.ok || (ca.data != cb.data);
    end
  end
endmodule
