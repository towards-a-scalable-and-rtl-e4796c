// tb_tdm_tx: drives random columns into two TDM modulators, one with a single channel (the
// default) and one with two channels, and rebuilds every column from the symbols with a
// reference model. It checks the column data, the sym_first mark, that a column occupies the
// link for exactly ceil(43 / (4*CH)) cycles (11 for one channel, 6 for two), and that columns
// offered back to back follow each other with no idle cycle.
module tb_tdm_tx;
  import winoc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

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

  logic              cv [2], cf [2], cr [2], sv [2], sf [2];
  logic [WCOL_W-1:0] cd [2];
  logic [3:0]        sd1;
  logic [7:0]        sd2;

  tdm_tx #(.CH(1)) u1 (.clk, .rst_n, .col_valid(cv[0]), .col_data(cd[0]), .col_first(cf[0]),
                       .col_ready(cr[0]), .sym_valid(sv[0]), .sym_data(sd1), .sym_first(sf[0]));
  tdm_tx #(.CH(2)) u2 (.clk, .rst_n, .col_valid(cv[1]), .col_data(cd[1]), .col_first(cf[1]),
                       .col_ready(cr[1]), .sym_valid(sv[1]), .sym_data(sd2), .sym_first(sf[1]));

  for (genvar g = 0; g < 2; g++) begin : g_ch
    localparam int BPC = 4 * (g + 1);
    localparam int NSYM = (WCOL_W + BPC - 1) / BPC;
    logic [WCOL_W-1:0] exp_q [$];
    logic              expf_q [$];
    int                sent = 0, got = 0;

    // source: random columns with random gaps; col_first on every 7th column
    initial begin
      cv[g] = 0; cd[g] = '0; cf[g] = 0;
      @(posedge rst_n);
      @(negedge clk);
      for (int i = 0; i < 700; i++) begin
        automatic logic [WCOL_W-1:0] c = {11'($urandom), $urandom};
        // first half: random gaps; second half: columns offered back to back
        if (i < 350) begin
          cv[g] = 0;
          repeat ($urandom_range(3, 0)) @(negedge clk);
        end
        cv[g] = 1; cd[g] = c; cf[g] = (i % 7 == 0);
        #1;
        while (!cr[g]) begin @(negedge clk); #1; end
        exp_q.push_back(c); expf_q.push_back(i % 7 == 0);
        sent++;
        @(negedge clk);
      end
      cv[g] = 0;
    end

    // reference demodulator: bit (t*CH + c) of symbol s is column bit s*BPC + t*CH + c
    initial begin
      logic [NSYM*BPC-1:0] acc;
      automatic int start, prev_end = -100, cyc = 0;
      @(posedge rst_n);
      forever begin
        @(negedge clk); cyc++;
        if (g == 0 ? sv[0] : sv[1]) begin
          acc = '0;
          start = cyc;
          check((g == 0 ? sf[0] : sf[1]) == expf_q[0], "sym_first");
          for (int s = 0; s < NSYM; s++) begin
            if (s > 0) begin
              @(negedge clk); cyc++;
              check(g == 0 ? sv[0] : sv[1], "symbols of a column are contiguous");
              check((g == 0 ? sf[0] : sf[1]) == 1'b0, "sym_first only on first symbol");
            end
            if (g == 0) acc[s*BPC +: 4] = sd1; else acc[s*BPC +: 8] = sd2;
          end
          check(cyc - start + 1 == NSYM, "column occupies NSYM cycles");
          check(exp_q.size() > 0 && acc[WCOL_W-1:0] == exp_q[0], "column data");
          void'(exp_q.pop_front()); void'(expf_q.pop_front());
          got++;
          if (got > 350 && got < 700) check(start == prev_end + 1, "back-to-back columns");
          prev_end = cyc;
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (g_ch[0].got == 700 && g_ch[1].got == 700);
    repeat (20) @(posedge clk);
    check(!sv[0] && !sv[1], "idle after last column");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
