// tb_jtec_sqed_encoder: checks the JTEC-SQED encoder against a reference built here from the
// code's definition. Each check bit must be the XOR of the data bits whose weight-3 column has
// a one in that row. Each wire must equal its duplicate, and the data must appear unchanged.
// It also checks that every check bit covers 13 or 14 data bits (balanced Hsiao rows).
module tb_jtec_sqed_encoder;
  logic [31:0] d;
  logic [77:0] w;
  int checks = 0, failures = 0;
  logic [6:0] cols [32];

  jtec_sqed_encoder dut (.d(d), .w(w));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s d=%h w=%h", what, d, w);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    logic [6:0] c;
    logic [38:0] a;
    int rw;
    // weight-3 columns in increasing order, three skipped to balance the rows
    n = 0;
    for (int v = 0; v < 128 && n < 32; v++) begin
      if ((v[0]+v[1]+v[2]+v[3]+v[4]+v[5]+v[6]) == 3 && v != 7 && v != 28 && v != 112) begin
        cols[n] = v[6:0];
        n++;
      end
    end
    for (int r = 0; r < 7; r++) begin
      rw = 0;
      for (int i = 0; i < 32; i++) rw += cols[i][r];
      check(rw == 13 || rw == 14, "row weight");
    end
    for (int t = 0; t < 2000; t++) begin
      d = (t < 32) ? (32'd1 << t) : $urandom;
      #1;
      c = 0;
      for (int i = 0; i < 32; i++) if (d[i]) c = c ^ cols[i];
      for (int i = 0; i < 39; i++) a[i] = w[2*i];
      check(a[31:0] == d, "data bits");
      check(a[38:32] == c, "check bits");
      for (int i = 0; i < 39; i++) check(w[2*i] == w[2*i+1], "duplicate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
