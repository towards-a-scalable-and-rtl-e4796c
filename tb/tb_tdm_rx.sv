// tb_tdm_rx: feeds symbol streams built by a reference modulator into the TDM demodulator, with
// one and with two channels, and checks every rebuilt column, its col_first mark and that it
// appears exactly one cycle after its last symbol. It also cuts a column short and then starts
// a new block, which must resynchronise the receiver.
module tb_tdm_rx;
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

  logic              sv [2], sf [2], cv [2], cf [2];
  logic [3:0]        sd1;
  logic [7:0]        sd2;
  logic [WCOL_W-1:0] cd [2];
  int                done_n = 0;

  tdm_rx #(.CH(1)) u1 (.clk, .rst_n, .sym_valid(sv[0]), .sym_data(sd1), .sym_first(sf[0]),
                       .col_valid(cv[0]), .col_data(cd[0]), .col_first(cf[0]));
  tdm_rx #(.CH(2)) u2 (.clk, .rst_n, .sym_valid(sv[1]), .sym_data(sd2), .sym_first(sf[1]),
                       .col_valid(cv[1]), .col_data(cd[1]), .col_first(cf[1]));

  for (genvar g = 0; g < 2; g++) begin : g_ch
    localparam int BPC = 4 * (g + 1);
    localparam int NSYM = (WCOL_W + BPC - 1) / BPC;

    initial begin
      sv[g] = 0; sf[g] = 0;
      if (g == 0) sd1 = '0; else sd2 = '0;
      @(posedge rst_n);
      @(negedge clk);
      for (int i = 0; i < 600; i++) begin
        automatic logic [NSYM*BPC-1:0] c = (NSYM*BPC)'({11'($urandom), $urandom});
        automatic logic first = (i % 7 == 0);
        // now and then a column cut short, followed by a block start
        automatic int cut = (i % 50 == 49) ? $urandom_range(NSYM - 1, 1) : NSYM;
        if (cut < NSYM) first = 1;
        for (int s = 0; s < cut; s++) begin
          sv[g] = 1; sf[g] = first && s == 0;
          if (g == 0) sd1 = c[s*BPC +: 4]; else sd2 = 8'(c[s*BPC +: BPC]);
          @(negedge clk);
          sv[g] = 0;
          if (s == NSYM - 1) begin
            check(cv[g] && cd[g] == c[WCOL_W-1:0], "column data one cycle after last symbol");
            check(cf[g] == first, "col_first");
          end else begin
            check(!cv[g], "no column before the last symbol");
          end
          if ($urandom_range(3, 0) == 0) @(negedge clk);
        end
        if (cut < NSYM) begin
          // the truncated column is dropped; resend it whole as a new block
          for (int s = 0; s < NSYM; s++) begin
            sv[g] = 1; sf[g] = (s == 0);
            if (g == 0) sd1 = c[s*BPC +: 4]; else sd2 = 8'(c[s*BPC +: BPC]);
            @(negedge clk);
          end
          sv[g] = 0;
          check(cv[g] && cd[g] == c[WCOL_W-1:0] && cf[g], "column after resynchronisation");
        end
      end
      done_n++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done_n == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
