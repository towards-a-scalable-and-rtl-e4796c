// tb_wb_tx: drives flits into the wireless transmitter and rebuilds the product-code blocks from
// the symbol stream with reference models. Checks:
//   - every data column equals the reference column of the next flit sent, in order, and
//     padding columns are empty
//   - the three parity columns equal the reference (7,4) parity of the block
//   - a saturated link starts a block every 77 cycles (7 columns of 11 symbols)
//   - no block starts while rx_full is high, and a started block is always finished
//   - a lone flit is flushed out padded
module tb_wb_tx;
  import winoc_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid, taken, sym_valid, sym_first, rx_full;
  flit_t in_flit;
  logic [NVC-1:0] vc_ready;
  logic [3:0] sym_data;

  wb_tx dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  flit_t exp_q [$];
  int    blocks = 0, sat_gaps = 0, cyc = 0;
  logic  saturate = 0;

  // receiver model, sampled at the falling edge
  initial begin
    col_t   cols [7];
    int     last_start = -1000;
    @(posedge rst_n);
    forever begin
      @(negedge clk); cyc++;
      if (sym_valid) begin
        automatic int start = cyc;
        check(sym_first, "block starts with sym_first");
        check(!rx_full, "no block start while rx_full");
        for (int k = 0; k < 7; k++) begin
          automatic logic [43:0] acc = '0;
          for (int s = 0; s < 11; s++) begin
            if (k != 0 || s != 0) begin
              @(negedge clk); cyc++;
            end
            check(sym_valid, "block is sent without gaps");
            check(sym_first == (k == 0 && s == 0), "sym_first position");
            acc[s*4 +: 4] = sym_data;
          end
          cols[k] = acc[42:0];
        end
        begin
          automatic block_t b = ref_block(cols[0], cols[1], cols[2], cols[3]);
          for (int k = 4; k < 7; k++) check(cols[k] == b[k], "parity column");
        end
        for (int k = 0; k < 4; k++) begin
          if (cols[k][42]) begin
            check(exp_q.size() > 0, "flit expected");
            if (exp_q.size() > 0) begin
              automatic flit_t f = exp_q.pop_front();
              check(cols[k] == ref_column(1'b1, f.ftype, f.vc, f.data), "data column");
            end
          end else begin
            check(cols[k] == '0, "padding column empty");
          end
        end
        if (saturate && blocks > 2) begin
          check(start - last_start == 77, "77 cycles per block");
          sat_gaps++;
        end
        last_start = start;
        blocks++;
      end
    end
  end

  task automatic send(input int n, input int maxgap);
    for (int i = 0; i < n; i++) begin
      flit_t f;
      f.ftype = ftype_e'($urandom_range(3, 0));
      f.vc = 2'($urandom);
      f.data = $urandom;
      in_valid = 1; in_flit = f;
      #1;
      while (!taken) begin @(negedge clk); #1; end
      check(vc_ready == {NVC{1'b1}}, "vc_ready when taken");
      exp_q.push_back(f);
      @(negedge clk);
      in_valid = 0;
      repeat ($urandom_range(maxgap, 0)) @(negedge clk);
    end
  endtask

  initial begin
    in_valid = 0; in_flit = '0; rx_full = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    saturate = 1;
    send(60, 0);
    saturate = 0;
    wait (exp_q.size() == 0);
    // rx_full toggling randomly
    fork
      begin
        repeat (3000) begin @(negedge clk); rx_full = ($urandom_range(3, 0) == 0); end
        rx_full = 0;
      end
      send(100, 6);
    join
    // a lone flit is flushed out
    send(1, 0);
    repeat (200) @(negedge clk);
    check(exp_q.size() == 0, "all flits sent");
    check(sat_gaps > 5, "saturation measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
