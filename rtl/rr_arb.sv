// rr_arb: round-robin arbiter. Grants the lowest requesting index at or above 'ptr', or, when
// there is none, the lowest requesting index overall. The caller moves 'ptr' past the winner
// to rotate priority. Combinational; 'gnt_v' is low when nothing requests.
module rr_arb #(
  parameter int unsigned N  = 4,
  parameter int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  req,
  input  logic [IW-1:0] ptr,
  output logic          gnt_v,
  output logic [IW-1:0] gnt
);
  always_comb begin
    logic hi;
    hi    = 1'b0;
    gnt_v = 1'b0;
    gnt   = '0;
    for (int i = N - 1; i >= 0; i--)
      if (req[i] && IW'(i) >= ptr) begin hi = 1'b1; gnt = IW'(i); end
    if (!hi)
      for (int i = N - 1; i >= 0; i--)
        if (req[i]) gnt = IW'(i);
    gnt_v = |req;
  end
endmodule
