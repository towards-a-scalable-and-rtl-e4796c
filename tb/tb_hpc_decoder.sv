// tb_hpc_decoder: sends reference product-code blocks into the decoder, clean and with
// injected errors, and checks the four flits that come back.
//   - clean blocks
//   - one random bit error in every column (column decoding must fix them, col_fix pulses)
//   - one column hit by a random burst of many bits, sideband included (row decoding must fix it)
//   - the burst column plus single errors in the other columns
// It also checks that out_valid comes exactly one cycle after the 7th column, that columns
// may arrive with gaps, and that padding columns are reported through out_fv.
module tb_hpc_decoder;
  import winoc_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic col_valid, col_first, out_valid, col_fix, row_fix;
  logic [WCOL_W-1:0] col_data;
  flit_t [3:0] out_flit;
  logic [3:0] out_fv;
  int checks = 0, failures = 0;
  int n_colfix = 0, n_rowfix = 0;

  hpc_decoder dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && col_fix) n_colfix++;
    if (rst_n && row_fix) n_rowfix++;
  end

  // mode: 0 clean, 1 single error per column, 2 burst column, 3 burst + singles
  task automatic run_block(input int mode);
    flit_t f [4];
    logic  v [4];
    col_t  c [4];
    block_t b;
    int burst_col = $urandom_range(6, 0);
    for (int j = 0; j < 4; j++) begin
      f[j].ftype = ftype_e'($urandom_range(3, 0));
      f[j].vc = 2'($urandom);
      f[j].data = $urandom;
      v[j] = ($urandom_range(5, 0) != 0);
      c[j] = v[j] ? ref_column(1'b1, f[j].ftype, f[j].vc, f[j].data) : '0;
    end
    b = ref_block(c[0], c[1], c[2], c[3]);
    for (int k = 0; k < 7; k++) begin
      if (mode == 1 || (mode == 3 && k != burst_col))
        b[k][$urandom_range(37, 0)] ^= 1'b1;
      if ((mode == 2 || mode == 3) && k == burst_col)
        b[k] ^= {11'($urandom), $urandom};
    end
    for (int k = 0; k < 7; k++) begin
      @(negedge clk);
      col_valid = 1; col_first = (k == 0); col_data = b[k];
      @(negedge clk);
      col_valid = 0;
      check(out_valid == (k == 6), "out_valid exactly one cycle after 7th column");
      if (k == 6 && out_valid) begin
        for (int j = 0; j < 4; j++) begin
          check(out_fv[j] == v[j], "flit valid");
          if (v[j]) check(out_flit[j].data == f[j].data && out_flit[j].ftype == f[j].ftype &&
                          out_flit[j].vc == f[j].vc, $sformatf("flit %0d mode %0d", j, mode));
        end
      end
      repeat ($urandom_range(2, 0)) @(negedge clk);
    end
  endtask

  initial begin
    col_valid = 0; col_first = 0; col_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 4; m++) begin
      for (int t = 0; t < 200; t++) run_block(m);
      if (m == 0) check(n_colfix == 0 && n_rowfix == 0, "no fixes on clean blocks");
    end
    check(n_colfix > 0, "column decoding exercised");
    check(n_rowfix > 0, "row decoding exercised");
    $display("col_fix=%0d row_fix=%0d", n_colfix, n_rowfix);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
