// tb_subnet: packet traffic through one subnet (16 switches in a 4x4 mesh, coded links
// between neighbours). Each core injects packets to cores of the same subnet and to other
// subnets; the hub side injects packets into every switch's hub port. Checks:
//   - a packet for this subnet reaches its destination core; a packet for another subnet
//     leaves on the hub link of the source's own switch (direct switch-hub links)
//   - flits in order, one VC per packet, no mixing, payload intact, all delivered
//   - latency of a lone single-flit packet: 4 cycles to the neighbouring core (2 per switch),
//     plus 2 for each further mesh hop (checked for a 6-hop corner-to-corner path: 14 cycles)
module tb_subnet;
  import winoc_pkg::*;
  localparam int N = SUBNET_SZ;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] subnet_id = 4'd5;
  logic  [N-1:0]          civ, cov, cot, hov, hot, hiv;
  flit_t [N-1:0]          cif, cof, hof, hif;
  logic  [N-1:0][NVC-1:0] cir, cor, hor, hir;

  subnet dut (
    .clk, .rst_n, .subnet_id,
    .core_in_valid(civ), .core_in_flit(cif), .core_in_vc_ready(cir),
    .core_out_valid(cov), .core_out_flit(cof), .core_out_vc_ready(cor), .core_out_taken(cot),
    .hub_out_valid(hov), .hub_out_flit(hof), .hub_out_vc_ready(hor), .hub_out_taken(hot),
    .hub_in_valid(hiv), .hub_in_flit(hif), .hub_in_vc_ready(hir));

  for (genvar c = 0; c < N; c++) begin : g_t
    assign cot[c] = cov[c] && cor[c][cof[c].vc];
    assign hot[c] = hov[c] && hor[c][hof[c].vc];
  end

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

  // sources: ports 0..N-1 are cores, N..2N-1 the hub side of each switch
  typedef struct { int dsub; int dloc; int len; int id; } pkt_t;
  pkt_t src_q [2*N][$];
  int   cur_len [2*N], cur_seq [2*N], cur_vc [2*N];
  pkt_t cur [2*N];
  int   exp_port [int], exp_len [int];   // expected sink: 0..N-1 core, N..2N-1 hub link
  time  t_inj [int];
  int   next_id = 0;

  task automatic add_pkt(int sp, int dsub, int dloc, int len);
    pkt_t p;
    p.dsub = dsub; p.dloc = dloc; p.len = len; p.id = next_id;
    exp_len[next_id] = len;
    exp_port[next_id] = (dsub == int'(subnet_id)) ? dloc : N + (sp % N);
    next_id++;
    src_q[sp].push_back(p);
  endtask

  always @(negedge clk) if (rst_n) begin
    for (int sp = 0; sp < 2 * N; sp++) begin
      automatic logic ok;
      if (sp < N) civ[sp] = 0; else hiv[sp - N] = 0;
      if (cur_len[sp] == 0 && src_q[sp].size() > 0) begin
        cur[sp] = src_q[sp].pop_front();
        cur_len[sp] = cur[sp].len; cur_seq[sp] = 0; cur_vc[sp] = $urandom_range(NVC - 1, 0);
      end
      ok = (sp < N) ? cir[sp][cur_vc[sp]] : hir[sp - N][cur_vc[sp]];
      if (cur_len[sp] != 0 && ok) begin
        automatic flit_t f;
        automatic header_t h = '0;
        h.tag = 8'(cur[sp].id);
        h.dst_subnet = 4'(cur[sp].dsub); h.dst_local = 4'(cur[sp].dloc);
        h.src_subnet = (sp < N) ? subnet_id : 4'(cur[sp].id % 16);
        h.src_local = 4'(sp % N);
        f.vc = 2'(cur_vc[sp]);
        f.ftype = (cur_len[sp] == 1) ? FT_SINGLE : (cur_seq[sp] == 0) ? FT_HEAD :
                  (cur_seq[sp] == cur_len[sp] - 1) ? FT_TAIL : FT_BODY;
        f.data = (cur_seq[sp] == 0) ? 32'(h) : {16'(cur[sp].id), 16'(cur_seq[sp])};
        if (cur_seq[sp] == 0) t_inj[cur[sp].id] = $time;
        if (sp < N) begin civ[sp] = 1; cif[sp] = f; end else begin hiv[sp - N] = 1; hif[sp - N] = f; end
        cur_seq[sp]++;
        if (cur_seq[sp] == cur_len[sp]) cur_len[sp] = 0;
      end
    end
  end

  // sinks
  int  o_id [2*N][NVC], o_seq [2*N][NVC];
  int  lat [int];
  logic stall = 0;
  always @(negedge clk) if (rst_n) begin
    for (int c = 0; c < N; c++)
      for (int v = 0; v < NVC; v++) begin
        cor[c][v] = stall ? ($urandom_range(3, 0) == 0) : 1'b1;
        hor[c][v] = stall ? ($urandom_range(3, 0) == 0) : 1'b1;
      end
    #1;
    for (int q = 0; q < 2 * N; q++) begin
      automatic logic  vld = (q < N) ? cot[q] : hot[q - N];
      automatic flit_t f = (q < N) ? cof[q] : hof[q - N];
      automatic int    v = int'(f.vc);
      if (vld) begin
        if (is_head(f.ftype)) begin
          automatic header_t hh = header_t'(f.data);
          automatic int id = int'(hh.tag);
          check(o_id[q][v] < 0, "no new packet inside an open one on this VC");
          check(exp_port.exists(id) && exp_port[id] == q, "packet leaves at the right place");
          lat[id] = int'(($time - 1 - t_inj[id]) / 10);
          o_id[q][v] = id; o_seq[q][v] = 1;
        end else begin
          check(o_id[q][v] >= 0 && f.data == {16'(o_id[q][v]), 16'(o_seq[q][v])}, "body flit in order");
          o_seq[q][v]++;
        end
        if (is_tail(f.ftype)) begin
          if (o_id[q][v] >= 0) begin
            check(o_seq[q][v] == exp_len[o_id[q][v]], "packet length");
            exp_port.delete(o_id[q][v]);
          end
          o_id[q][v] = -1;
        end
      end
    end
  end

  task automatic drain(int max_cycles);
    for (int t = 0; t < max_cycles && exp_port.size() != 0; t++) @(negedge clk);
    check(exp_port.size() == 0, "all packets delivered");
  endtask

  initial begin
    civ = '0; hiv = '0; cif = '0; hif = '0; cor = '1; hor = '1;
    for (int q = 0; q < 2 * N; q++) begin
      cur_len[q] = 0;
      for (int v = 0; v < NVC; v++) o_id[q][v] = -1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    add_pkt(0, 5, 1, 1);
    drain(50);
    check(lat[0] == 4, $sformatf("neighbour latency 4 cycles (got %0d)", lat[0]));
    add_pkt(0, 5, 15, 1);
    drain(50);
    check(lat[1] == 14, $sformatf("corner-to-corner latency 14 cycles (got %0d)", lat[1]));
    for (int ph = 0; ph < 2; ph++) begin
      stall = (ph == 1);
      for (int i = 0; i < 100; i++) begin
        automatic int sp = $urandom_range(2 * N - 1, 0);
        automatic int ds = (sp < N && $urandom_range(2, 0) == 0) ? int'($urandom_range(15, 0)) : 5;
        add_pkt(sp, ds, $urandom_range(15, 0), $urandom_range(6, 1));
      end
      drain(20000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
