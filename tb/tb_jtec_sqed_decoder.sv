// tb_jtec_sqed_decoder: encodes random flits with a reference JTEC-SQED encoder written here.
// It flips 0 to 4 distinct random wires of the 78 and checks the decoder. Up to three errors
// must give the original data with 'uncorrectable' low, and 'corrected' must be high whenever
// a wire was flipped. A four-error pattern must either raise 'uncorrectable' or still decode
// correctly (four errors in one copy whose syndrome is non-zero select the other copy). Hand-picked
// patterns add a burst of three adjacent wires and four errors inside one copy.
module tb_jtec_sqed_decoder;
  logic [77:0] w;
  logic [31:0] d;
  logic corrected, uncorrectable;
  int checks = 0, failures = 0;
  logic [6:0] cols [32];

  jtec_sqed_decoder dut (.w(w), .d(d), .corrected(corrected), .uncorrectable(uncorrectable));

  function automatic logic [77:0] ref_enc(logic [31:0] x);
    logic [6:0] c = 0;
    logic [38:0] a;
    logic [77:0] r;
    for (int i = 0; i < 32; i++) if (x[i]) c = c ^ cols[i];
    a = {c, x};
    for (int i = 0; i < 39; i++) begin r[2*i] = a[i]; r[2*i+1] = a[i]; end
    return r;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s w=%h d=%h", what, w, d);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, ne;
    int pos [4];
    logic [31:0] x;
    logic [77:0] e;
    logic dup;
    n = 0;
    for (int v = 0; v < 128 && n < 32; v++)
      if ((v[0]+v[1]+v[2]+v[3]+v[4]+v[5]+v[6]) == 3 && v != 7 && v != 28 && v != 112) begin
        cols[n] = v[6:0]; n++;
      end
    for (int t = 0; t < 20000; t++) begin
      x  = $urandom;
      ne = t % 5;
      e  = '0;
      for (int k = 0; k < ne; k++) begin
        do begin
          pos[k] = $urandom_range(77, 0);
          dup = 0;
          for (int j = 0; j < k; j++) if (pos[j] == pos[k]) dup = 1;
        end while (dup);
        e[pos[k]] = 1'b1;
      end
      w = ref_enc(x) ^ e;
      #1;
      if (ne <= 3) begin
        check(d == x, "data");
        check(!uncorrectable, "no false alarm");
        check(corrected == (ne != 0), "corrected flag");
      end else begin
        check(uncorrectable || d == x, "quadruple detected or corrected");
      end
    end
    // burst of 3 adjacent wires
    for (int s = 0; s < 76; s++) begin
      x = $urandom;
      w = ref_enc(x) ^ (78'b111 << s);
      #1;
      check(d == x && !uncorrectable, "burst3");
    end
    // four errors in copy A only
    for (int t = 0; t < 200; t++) begin
      x = $urandom;
      e = '0;
      for (int k = 0; k < 4; k++) e[2*((t*7 + k*11) % 39)] = 1'b1;
      w = ref_enc(x) ^ e;
      #1;
      check(uncorrectable || d == x, "quad in one copy");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
