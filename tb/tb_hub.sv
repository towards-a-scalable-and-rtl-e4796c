// tb_hub: random packet traffic through one hub (hubs 3 and 12 are tried). All 20 ports - 16
// switch links, the two ring directions and two wireless ports - have a packet source and a
// sink; the sinks stall VCs at random. Packets from the switches carry unrouted headers; packets
// from the ring and wireless ports carry route fields an earlier hub would have set. A
// reference model of the routing rules checks that:
//   - a packet from this subnet is pre-routed: the shortest of the all-ring path and every
//     one-wireless-link path, wireless preferred on a tie, is written into the header
//   - each packet leaves on the right port: its destination switch, the ring direction that is
//     shorter (clockwise on a tie) towards the wireless link's source hub or the destination,
//     or the wireless port of its link; wl_done is set when it takes a wireless port
//   - packets keep flit order, one output VC per packet, no mixing (wormhole), all delivered
//   - an unloaded hub forwards a head flit two cycles after it was stored
// It also counts contention, and how many packets took wireless, ring and local ports.
module tb_hub;
  import winoc_pkg::*;
  localparam int NP = HUB_NP;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] hub_id;
  logic  [NP-1:0]          in_valid, out_valid, out_taken;
  flit_t [NP-1:0]          in_flit, out_flit;
  logic  [NP-1:0][NVC-1:0] in_vc_ready, out_vc_ready;

  hub dut (.*);
  assign out_taken = out_valid;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference hub routing, written from the routing rules
  function automatic int rdist(int a, int b);
    int cw = (b - a + 16) % 16;
    return (cw <= 16 - cw) ? cw : 16 - cw;
  endfunction
  function automatic int rport(int a, int b);
    int cw = (b - a + 16) % 16;
    return (cw <= 16 - cw) ? 16 : 17;
  endfunction
  // source-hub choice: shortest of the ring path and every single-wireless-link path,
  // wireless preferred on a tie, the lowest link number among equals
  function automatic void ref_preroute(input int src, input int dst, output logic wl, output int link);
    int best = rdist(src, dst);
    wl = 0; link = 0;
    for (int k = 0; k < NWL; k++) begin
      int h = rdist(src, int'(WL_SRC[k])) + 1 + rdist(int'(WL_DST[k]), dst);
      if (h < best || (h == best && !wl)) begin best = h; wl = 1; link = k; end
    end
  endfunction
  function automatic int out_slot(int k);
    int n = 0;
    for (int j = 0; j < k; j++) if (WL_SRC[j] == WL_SRC[k]) n++;
    return n;
  endfunction
  // expected header after the hub (route fields filled in at the source hub)
  function automatic header_t exp_hdr(header_t h);
    header_t r = h;
    if (!r.routed && int'(r.dst_subnet) != int'(hub_id)) begin
      logic wl; int link;
      ref_preroute(int'(hub_id), int'(r.dst_subnet), wl, link);
      r.routed = 1; r.use_wl = wl; r.wl_link = 5'(link);
    end
    if (exp_port_r(r) >= 18) r.wl_done = 1;
    return r;
  endfunction
  function automatic int exp_port_r(header_t r);
    if (int'(r.dst_subnet) == int'(hub_id)) return int'(r.dst_local);
    if (r.use_wl && !r.wl_done) begin
      int k = int'(r.wl_link);
      if (int'(WL_SRC[k]) == int'(hub_id)) return 18 + out_slot(k);
      return rport(int'(hub_id), int'(WL_SRC[k]));
    end
    return rport(int'(hub_id), int'(r.dst_subnet));
  endfunction
  function automatic int exp_port(header_t h);
    header_t r = h;
    if (!r.routed && int'(r.dst_subnet) != int'(hub_id)) begin
      logic wl; int link;
      ref_preroute(int'(hub_id), int'(r.dst_subnet), wl, link);
      r.routed = 1; r.use_wl = wl; r.wl_link = 5'(link);
    end
    return exp_port_r(r);
  endfunction

  // scoreboard
  int exp_o   [int];     // packet id -> expected output port
  int exp_len [int];
  header_t exp_h [int];
  int n_wl = 0, n_ring = 0, n_local = 0, n_prerouted = 0;
  int cur_id  [NP][NVC];
  int cur_seq [NP][NVC];
  int sent = 0, delivered = 0, contention = 0;
  logic stall = 0;

  always @(negedge clk) if (rst_n) begin
    for (int o = 0; o < NP; o++)
      for (int v = 0; v < NVC; v++)
        out_vc_ready[o][v] = stall ? ($urandom_range(3, 0) == 0) : 1'b1;
    #1;
    for (int o = 0; o < NP; o++) if (out_valid[o]) begin
      automatic flit_t f = out_flit[o];
      automatic int v = int'(f.vc);
      check(out_vc_ready[o][v], "offered only when downstream VC has room");
      if (is_head(f.ftype)) begin
        automatic header_t h = header_t'(f.data);
        automatic int id = int'(h.tag);
        check(cur_id[o][v] < 0, "no new packet inside an open one on this VC");
        check(exp_o.exists(id) && exp_o[id] == o, $sformatf("packet %0d leaves on port %0d", id, o));
        check(exp_h.exists(id) && h == exp_h[id], "header rewritten as expected");
        if (o >= 18) n_wl++; else if (o >= 16) n_ring++; else n_local++;
        if (exp_h.exists(id) && exp_h[id].use_wl && !h.wl_done) n_prerouted++;
        cur_id[o][v] = id; cur_seq[o][v] = 1;
      end else begin
        check(cur_id[o][v] >= 0 && f.data == {16'(cur_id[o][v]), 16'(cur_seq[o][v])},
              "body flit in order on its VC");
        cur_seq[o][v]++;
      end
      if (is_tail(f.ftype)) begin
        check(exp_len.exists(cur_id[o][v]) && cur_seq[o][v] == exp_len[cur_id[o][v]], "packet length");
        exp_o.delete(cur_id[o][v]);
        cur_id[o][v] = -1;
        delivered++;
      end
    end
  end

  // contention: two input ports holding routed heads for the same output
  always @(negedge clk) if (rst_n) begin
    int want [NP];
    for (int o = 0; o < NP; o++) want[o] = 0;
    for (int p = 0; p < NP; p++)
      if (in_valid[p] && is_head(in_flit[p].ftype)) want[exp_port(header_t'(in_flit[p].data))]++;
    for (int o = 0; o < NP; o++) if (want[o] > 1) contention++;
  end

  int next_id = 0, src_done = 0;
  task automatic send_packet(input int p, input int len, input header_t h0);
    int id;
    int v;
    header_t h = h0;
    // tags are 8 bits: never reuse one that is still in flight
    while (exp_o.exists(next_id)) begin
      next_id = (next_id + 1) % 256;
      if (exp_o.size() > 200) @(negedge clk);
    end
    id = next_id;
    next_id = (next_id + 1) % 256;
    h.tag = 8'(id);
    exp_o[id] = exp_port(h);
    exp_h[id] = exp_hdr(h);
    exp_len[id] = len;
    v = $urandom_range(NVC - 1, 0);
    for (int s = 0; s < len; s++) begin
      while (!in_vc_ready[p][v]) @(negedge clk);
      in_valid[p] = 1;
      in_flit[p].vc = 2'(v);
      in_flit[p].ftype = (len == 1) ? FT_SINGLE : (s == 0) ? FT_HEAD : (s == len - 1) ? FT_TAIL : FT_BODY;
      in_flit[p].data = (s == 0) ? 32'(h) : {16'(id), 16'(s)};
      @(negedge clk);
      in_valid[p] = 0;
    end
    sent++;
  endtask

  // headers from a local switch are not yet routed; headers from the ring or a wireless port
  // carry route fields set by an earlier hub
  function automatic header_t rand_hdr(int p);
    header_t h = '0;
    h.dst_subnet = ($urandom_range(4, 0) == 0) ? hub_id : 4'($urandom);
    h.dst_local = 4'($urandom);
    h.src_subnet = 4'($urandom);
    h.src_local = 4'($urandom);
    if (p < 16) begin
      h.src_subnet = hub_id;
      h.src_local = 4'(p);
    end else begin
      h.routed = 1;
      h.use_wl = 1'($urandom);
      h.wl_link = 5'($urandom_range(NWL - 1, 0));
      h.wl_done = 1'($urandom);
    end
    return h;
  endfunction

  initial begin
    in_valid = '0; in_flit = '0; out_vc_ready = '1;
    for (int o = 0; o < NP; o++) for (int v = 0; v < NVC; v++) cur_id[o][v] = -1;
    for (int cfg = 0; cfg < 2; cfg++) begin
      hub_id = (cfg == 0) ? 4'd3 : 4'd12;
      rst_n = 0;
      stall = 0;
      repeat (3) @(posedge clk);
      rst_n = 1;
      @(negedge clk);
      // latency: single flit from switch 0 towards the next hub clockwise, over the ring
      begin
        header_t h = '0;
        h.dst_subnet = hub_id + 4'd1;
        send_packet(0, 1, h);
        #1;
        check(!out_valid[exp_o[next_id - 1]], "a head flit is routed in the cycle after it is stored");
        @(negedge clk);
        #1;
        check(out_valid[exp_o[next_id - 1]], "an unloaded hub forwards a head flit two cycles after it is stored");
      end
      repeat (5) @(negedge clk);
      for (int phase = 0; phase < 2; phase++) begin
        stall = (phase == 1);
        src_done = 0;
        for (int p = 0; p < NP; p++) begin
          automatic int pp = p;
          fork
            begin
              repeat (60) begin
                send_packet(pp, $urandom_range(6, 1), rand_hdr(pp));
                repeat ($urandom_range(3, 0)) @(negedge clk);
              end
              src_done++;
            end
          join_none
        end
        wait (src_done == NP);
        for (int t = 0; t < 3000 && exp_o.size() != 0; t++) @(negedge clk);
        check(exp_o.size() == 0, "all packets delivered");
      end
    end
    check(contention > 0, "output contention happened");
    check(n_wl > 0 && n_ring > 0 && n_local > 0 && n_prerouted > 0, "wireless, ring and local outputs used");
    $display("wireless=%0d ring=%0d local=%0d prerouted_to_wireless=%0d", n_wl, n_ring, n_local, n_prerouted);
    $display("sent=%0d delivered=%0d contention_cycles=%0d", sent, delivered, contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
