// tb_hpc_encoder: feeds flits into the product-code encoder and checks every column of every
// block against the reference block. The flits arrive back to back, with gaps, and as a short
// burst that must be flushed with empty columns after FLUSH_WAIT idle cycles. It also checks
// that a full block is offered the cycle after its 4th flit, and that columns wait while
// col_ready is low.
module tb_hpc_encoder;
  import winoc_pkg::*;
  import tb_ref_pkg::*;
  localparam int FW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, col_valid, col_first, col_ready;
  flit_t in_flit;
  logic [WCOL_W-1:0] col_data;
  int checks = 0, failures = 0;

  hpc_encoder #(.FLUSH_WAIT(FW)) dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  col_t exp_q [$];
  int   sent_at4;

  // receiver: random col_ready, compare columns in order
  initial begin
    int idx = 0;
    col_ready = 0;
    forever begin
      // all sampling is done at the falling edge, where the DUT outputs are stable; a
      // handshake seen there completes at the next rising edge
      @(negedge clk);
      col_ready = ($urandom_range(3, 0) != 0);
      #1;
      if (col_valid && col_ready) begin
        check(exp_q.size() > 0, "unexpected column");
        if (exp_q.size() > 0) check(col_data == exp_q.pop_front(), "column data");
        check(col_first == (idx == 0), "col_first");
        idx = (idx + 1) % 7;
      end
    end
  end

  task automatic send_block(input int n, input int gap);
    col_t c [4];
    block_t b;
    flit_t fs [4];
    for (int j = 0; j < 4; j++) begin
      c[j] = '0;
      fs[j].ftype = ftype_e'($urandom_range(3, 0));
      fs[j].vc    = 2'($urandom);
      fs[j].data  = $urandom;
      if (j < n) c[j] = ref_column(1'b1, fs[j].ftype, fs[j].vc, fs[j].data);
    end
    b = ref_block(c[0], c[1], c[2], c[3]);
    for (int j = 0; j < 7; j++) exp_q.push_back(b[j]);
    for (int j = 0; j < n; j++) begin
      automatic flit_t f = fs[j];
      @(negedge clk);
      in_valid = 1; in_flit = f;
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      in_valid = 0;
      repeat (gap) @(negedge clk);
    end
  endtask

  initial begin
    in_valid = 0; in_flit = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // latency: the first column is offered one cycle after the 4th flit is stored
    send_block(4, 0);
    check(!col_valid, "block not offered before it is moved");
    @(negedge clk);
    check(col_valid, "block offered one cycle after the 4th flit");
    for (int t = 0; t < 30; t++) send_block(4, $urandom_range(2, 0));
    // partial block flushed
    send_block(2, 0);
    repeat (FW + 2) @(posedge clk);
    check(exp_q.size() < 7, "partial block flushed");
    send_block(1, 0);
    repeat (400) @(posedge clk);
    check(exp_q.size() == 0, "all columns delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
