// tb_wb_rx: sends reference product-code blocks over a modelled air link into the wireless
// receiver and checks the flits that reach the hub side, in order. Channel errors are injected:
// single bit errors in columns and whole corrupted columns (bursts), which must all be
// corrected. The hub side is stalled per VC at random, so the receive FIFO fills; 'full' must
// rise at FULL_AT flits, the transmitter model then stops starting blocks, and the FIFO must
// never overflow (the module asserts this). Timing check: with an empty FIFO, a block's first
// flit is offered 3 cycles after the block's last symbol.
module tb_wb_rx;
  import winoc_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic sym_valid, sym_first, out_valid, full, col_fix, row_fix;
  logic [3:0] sym_data;
  flit_t out_flit;
  logic [NVC-1:0] hub_vc_ready;

  wb_rx dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  flit_t exp_q [$];
  int n_full = 0, n_colfix = 0, n_rowfix = 0, got = 0, maxcnt = 0;
  logic stall_mode = 0;

  // hub side, sampled at the falling edge
  always @(negedge clk) if (rst_n) begin
    hub_vc_ready = stall_mode ? ($urandom_range(40, 0) == 0 ? NVC'($urandom) : '0)
                              : NVC'($urandom) | NVC'($urandom);
    #1;
    if (full) n_full++;
    if (col_fix) n_colfix++;
    if (row_fix) n_rowfix++;
    if (int'(dut.cnt) > maxcnt) maxcnt = int'(dut.cnt);
    check(full == (int'(dut.cnt) >= 8), "full at 8 flits");
    if (out_valid && hub_vc_ready[out_flit.vc]) begin
      check(exp_q.size() > 0, "flit expected");
      if (exp_q.size() > 0) begin
        flit_t f;
        f = exp_q.pop_front();
        check(out_flit == f, "flit in order and intact");
      end
      got++;
    end
  end

  // mode 0 clean, 1 single errors in every column, 2 one column burst
  task automatic send_block(input int mode, input bit latency_check);
    col_t c [4];
    block_t b;
    int nf = $urandom_range(4, 1);
    int bc = $urandom_range(6, 0);
    for (int j = 0; j < 4; j++) begin
      c[j] = '0;
      if (j < nf) begin
        flit_t f;
        f.ftype = ftype_e'($urandom_range(3, 0));
        f.vc = 2'($urandom);
        f.data = $urandom;
        exp_q.push_back(f);
        c[j] = ref_column(1'b1, f.ftype, f.vc, f.data);
      end
    end
    b = ref_block(c[0], c[1], c[2], c[3]);
    for (int k = 0; k < 7; k++) begin
      if (mode == 1) b[k][$urandom_range(37, 0)] ^= 1'b1;
      if (mode == 2 && k == bc) b[k] ^= {11'($urandom), $urandom};
    end
    // the transmitter only starts a block while full is low
    while (full) @(negedge clk);
    for (int k = 0; k < 7; k++)
      for (int s = 0; s < 11; s++) begin
        automatic logic [43:0] w = {1'b0, b[k]};
        sym_valid = 1; sym_first = (k == 0 && s == 0); sym_data = w[s*4 +: 4];
        @(negedge clk);
      end
    sym_valid = 0; sym_first = 0;
    if (latency_check) begin
      check(!out_valid, "no flit before 3 cycles");
      @(negedge clk);
      check(!out_valid, "no flit before 3 cycles");
      @(negedge clk);
      check(out_valid, "first flit 3 cycles after last symbol");
    end
  endtask

  initial begin
    sym_valid = 0; sym_first = 0; sym_data = '0; hub_vc_ready = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    wait (exp_q.size() == 0);
    @(negedge clk);
    send_block(0, 1);
    for (int t = 0; t < 150; t++) send_block(t % 3, 0);
    stall_mode = 1;
    for (int t = 0; t < 150; t++) send_block(t % 3, 0);
    stall_mode = 0;
    repeat (300) @(negedge clk);
    check(exp_q.size() == 0, "all flits delivered");
    check(n_full > 0, "full raised under back-pressure");
    check(n_colfix > 0 && n_rowfix > 0, "column and row corrections happened");
    $display("flits=%0d full_cycles=%0d col_fix=%0d row_fix=%0d max_fill=%0d", got, n_full,
             n_colfix, n_rowfix, maxcnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
