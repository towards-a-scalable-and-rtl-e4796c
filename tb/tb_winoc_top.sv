// tb_winoc_top: end-to-end test of the full 256-core network at its default size.
//
// Each core can inject packets; each core output has a checker. Wireless link k is closed by a
// channel model from wl_tx_*[k] to wl_rx_*[k] that injects errors per block: none, one bit
// error in every column, or one column hit by a burst. The 'full' signal goes straight back.
// Random bit flips are put on the clockwise ring wires: one to three flipped wires, which the
// link must correct, and now and then a four-wire pattern that the decoder must detect so the
// flit is sent again.
//
// Traffic: a lone single-flit packet between mesh neighbours (its latency is checked: 4 cycles,
// two per switch hop), uniform random packets, ring-only packets, and a hotspot from all of
// subnet 0 to subnet 12 (one wireless hop) while the destination cores stall, to make the
// receiver raise 'full'.
//
// Checks: every packet reaches the right core, flits in order, one VC per packet, no mixing,
// payload intact, all delivered. Each mechanism is counted and must happen at least once:
// delivery inside a subnet, ring-only delivery, wireless delivery, product-code column
// correction, row correction, 'full', wired-link correction and wired-link retransmission.
module tb_winoc_top;
  import winoc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  [NCORE-1:0]          civ, cov;
  flit_t [NCORE-1:0]          cif, cof;
  logic  [NCORE-1:0][NVC-1:0] cir, cor;
  logic  [NWL-1:0]            tv, tf, rv, rf_, full, colfix, rowfix;
  logic  [NWL-1:0][3:0]       td, rd;
  logic  [NSUBNET-1:0][77:0]  ring_err;
  logic  [NSUBNET-1:0]        ring_fix, ring_retry;

  winoc_top dut (
    .clk, .rst_n, .core_in_valid(civ), .core_in_flit(cif), .core_in_vc_ready(cir),
    .core_out_valid(cov), .core_out_flit(cof), .core_out_vc_ready(cor),
    .wl_tx_sym_valid(tv), .wl_tx_sym_data(td), .wl_tx_sym_first(tf), .wl_tx_full(full),
    .wl_rx_sym_valid(rv), .wl_rx_sym_data(rd), .wl_rx_sym_first(rf_), .wl_rx_full(full),
    .wl_col_fix(colfix), .wl_row_fix(rowfix),
    .ring_err, .ring_fix, .ring_retry);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog: packets outstanding");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ wireless channel model
  int   sym_n  [NWL];
  int   mode   [NWL];
  int   bcol   [NWL];
  int   esym   [NWL];
  logic inject_wl = 0;
  always_comb begin
    rv  = tv;
    rf_ = tf;
  end
  always @(negedge clk) begin
    for (int k = 0; k < NWL; k++) begin
      automatic logic [3:0] e = '0;
      if (tv[k]) begin
        automatic int n = tf[k] ? 0 : sym_n[k];
        automatic int col = n / 11, s = n % 11;
        if (tf[k]) begin
          mode[k] = inject_wl ? $urandom_range(2, 0) : 0;
          bcol[k] = $urandom_range(6, 0);
        end
        // single errors stay in symbols 0..8 (column bits 0..35, inside the (38,32) word): the
        // 5 sideband bits have only the time code, which cannot fix two hits on one row
        if (s == 0) esym[k] = $urandom_range(8, 0);
        if (mode[k] == 1 && s == esym[k]) e[$urandom_range(3, 0)] = 1'b1;
        if (mode[k] == 2 && col == bcol[k]) e = 4'($urandom);
        sym_n[k] = n + 1;
      end
      rd[k] = td[k] ^ e;
    end
  end

  // ------------------------------------------------------------------ ring error model
  logic inject_ring = 0;
  always @(negedge clk) begin
    for (int s = 0; s < NSUBNET; s++) begin
      ring_err[s] = '0;
      if (inject_ring) begin
        automatic int r = $urandom_range(15, 0);
        if (r < 3) begin
          // one to three random wires
          for (int j = 0; j <= r; j++) begin
            automatic int w = $urandom_range(77, 0);
            ring_err[s][w] = 1'b1;
          end
        end else if (r == 3) begin
          // the same two data bits flipped in both copies: detected, not correctable
          automatic int a = $urandom_range(15, 0), b = $urandom_range(31, 16);
          ring_err[s][2*a] = 1; ring_err[s][2*a+1] = 1;
          ring_err[s][2*b] = 1; ring_err[s][2*b+1] = 1;
        end
      end
    end
  end

  // ------------------------------------------------------------------ packet sources
  typedef struct {
    int dst;
    int len;
    int id;
  } pkt_t;
  pkt_t src_q [NCORE][$];
  int   cur_len [NCORE], cur_seq [NCORE], cur_vc [NCORE], cur_id [NCORE], cur_dst [NCORE];
  int   exp_dst [int], exp_len [int], exp_src [int];
  int   next_id = 0, sent = 0, delivered = 0;
  time  t_inj [int];

  function automatic header_t mk_hdr(int src, int dst, int id);
    header_t h = '0;
    h.tag = 8'(id);
    h.src_subnet = 4'(src / 16); h.src_local = 4'(src % 16);
    h.dst_subnet = 4'(dst / 16); h.dst_local = 4'(dst % 16);
    return h;
  endfunction

  task automatic add_pkt(int src, int dst, int len);
    pkt_t p;
    p.dst = dst; p.len = len; p.id = next_id;
    exp_dst[next_id] = dst; exp_len[next_id] = len; exp_src[next_id] = src;
    next_id++;
    src_q[src].push_back(p);
  endtask

  always @(negedge clk) if (rst_n) begin
    for (int c = 0; c < NCORE; c++) begin
      civ[c] = 0;
      if (cur_len[c] == 0 && src_q[c].size() > 0) begin
        automatic pkt_t p = src_q[c].pop_front();
        cur_len[c] = p.len; cur_seq[c] = 0; cur_id[c] = p.id; cur_dst[c] = p.dst;
        cur_vc[c] = $urandom_range(NVC - 1, 0);
      end
      if (cur_len[c] != 0 && cir[c][cur_vc[c]]) begin
        civ[c] = 1;
        cif[c].vc = 2'(cur_vc[c]);
        cif[c].ftype = (cur_len[c] == 1) ? FT_SINGLE : (cur_seq[c] == 0) ? FT_HEAD :
                       (cur_seq[c] == cur_len[c] - 1) ? FT_TAIL : FT_BODY;
        cif[c].data = (cur_seq[c] == 0) ? 32'(mk_hdr(c, cur_dst[c], cur_id[c]))
                                        : {16'(cur_id[c]), 16'(cur_seq[c])};
        if (cur_seq[c] == 0) t_inj[cur_id[c]] = $time;
        cur_seq[c]++;
        if (cur_seq[c] == cur_len[c]) begin cur_len[c] = 0; sent++; end
      end
    end
  end

  // ------------------------------------------------------------------ sinks and counters
  int  o_id [NCORE][NVC], o_seq [NCORE][NVC];
  int  n_local = 0, n_ring = 0, n_wl = 0, n_colfix = 0, n_rowfix = 0, n_full = 0;
  int  n_ringfix = 0, n_retry = 0;
  logic [NCORE-1:0] stall_core = '0;
  int  cyc = 0, lat0 = -1;

  always @(negedge clk) if (rst_n) begin
    cyc++;
    for (int c = 0; c < NCORE; c++)
      for (int v = 0; v < NVC; v++)
        cor[c][v] = stall_core[c] ? 1'b0 : ($urandom_range(7, 0) != 0);
    for (int k = 0; k < NWL; k++) begin
      if (colfix[k]) n_colfix++;
      if (rowfix[k]) n_rowfix++;
      if (full[k]) n_full++;
    end
    for (int s = 0; s < NSUBNET; s++) begin
      if (ring_fix[s] && !ring_retry[s]) n_ringfix++;
      if (ring_retry[s]) n_retry++;
    end
    #1;
    for (int c = 0; c < NCORE; c++) if (cov[c] && cor[c][cof[c].vc]) begin
      automatic flit_t f = cof[c];
      automatic int v = int'(f.vc);
      if (is_head(f.ftype)) begin
        automatic header_t h = header_t'(f.data);
        automatic int id = -1;
        // find the packet by tag and source
        foreach (exp_dst[i])
          if (8'(i) == h.tag && exp_src[i] == int'(h.src_subnet) * 16 + int'(h.src_local)) id = i;
        check(id >= 0, "head of a known packet");
        check(o_id[c][v] < 0, "no new packet inside an open one on this VC");
        if (id >= 0) begin
          check(exp_dst[id] == c, "packet reaches its destination core");
          if (id == 0) lat0 = int'(($time - 1 - t_inj[0]) / 10);
          if (h.src_subnet == h.dst_subnet) n_local++;
          else if (h.wl_done) n_wl++;
          else if (!h.use_wl) n_ring++;
        end
        o_id[c][v] = id; o_seq[c][v] = 1;
      end else begin
        check(o_id[c][v] >= 0 && f.data == {16'(o_id[c][v]), 16'(o_seq[c][v])}, "body flit intact and in order");
        o_seq[c][v]++;
      end
      if (is_tail(f.ftype)) begin
        if (o_id[c][v] >= 0) begin
          check(o_seq[c][v] == exp_len[o_id[c][v]], "packet length");
          exp_dst.delete(o_id[c][v]);
        end
        o_id[c][v] = -1;
        delivered++;
      end
    end
  end

  task automatic drain(int max_cycles);
    for (int t = 0; t < max_cycles && exp_dst.size() != 0; t++) @(negedge clk);
    check(exp_dst.size() == 0, "all packets delivered");
  endtask

  initial begin
    civ = '0; cif = '0; cor = '1; ring_err = '0; rd = '0;
    for (int c = 0; c < NCORE; c++) begin
      cur_len[c] = 0;
      for (int v = 0; v < NVC; v++) o_id[c][v] = -1;
    end
    for (int k = 0; k < NWL; k++) begin sym_n[k] = 0; mode[k] = 0; bcol[k] = 0; esym[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1. latency of a lone single-flit packet between mesh neighbours (core 0 -> core 1)
    begin
      stall_core = '0;
      add_pkt(0, 1, 1);
      drain(100);
      check(lat0 == 4, $sformatf("two-hop latency is 4 cycles (got %0d)", lat0));
    end

    // 2. uniform random traffic with channel errors on wireless and ring links
    inject_wl = 1; inject_ring = 1;
    for (int i = 0; i < 96; i++)
      add_pkt($urandom_range(NCORE - 1, 0), $urandom_range(NCORE - 1, 0), $urandom_range(8, 1));
    // ring-only packets: subnet s to subnet s+1
    for (int s = 0; s < NSUBNET; s++)
      add_pkt(s * 16 + $urandom_range(15, 0), ((s + 1) % 16) * 16 + $urandom_range(15, 0), 4);
    drain(20000);

    // 3. hotspot over one wireless link while the destination cores stall
    for (int c = 0; c < 16; c++) stall_core[12 * 16 + c] = 1'b1;
    for (int c = 0; c < 16; c++)
      for (int j = 0; j < 3; j++) add_pkt(c, 12 * 16 + $urandom_range(15, 0), 8);
    repeat (1500) @(negedge clk);
    stall_core = '0;
    drain(20000);
    inject_wl = 0; inject_ring = 0;

    $display("packets sent=%0d delivered=%0d", sent, delivered);
    $display("mechanisms: local=%0d ring=%0d wireless=%0d col_fix=%0d row_fix=%0d full_cycles=%0d ring_fix=%0d ring_retry=%0d",
             n_local, n_ring, n_wl, n_colfix, n_rowfix, n_full, n_ringfix, n_retry);
    check(n_local > 0, "delivery inside a subnet happened");
    check(n_ring > 0, "ring-only delivery happened");
    check(n_wl > 0, "wireless delivery happened");
    check(n_colfix > 0, "product-code column correction happened");
    check(n_rowfix > 0, "product-code row correction happened");
    check(n_full > 0, "wireless full signal happened");
    check(n_ringfix > 0, "wired-link correction happened");
    check(n_retry > 0, "wired-link retransmission happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
