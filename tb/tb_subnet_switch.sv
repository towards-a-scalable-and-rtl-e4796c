// tb_subnet_switch: random packet traffic through one subnet switch (a corner and a middle
// position of the 4x4 mesh are both tried). Every port has a packet source and a sink; the
// sinks stall VCs at random. A scoreboard checks that:
//   - each packet leaves on the port that X-then-Y routing gives (local core port when it has
//     arrived, the hub port for another subnet)
//   - the flits of a packet leave in order, on one output VC, never mixed with another packet
//     on that VC (wormhole switching), and every packet is delivered
//   - a flit is only offered when the downstream VC has room
//   - an unloaded switch forwards a head flit two cycles after it was stored (route and VC
//     allocation, then traversal)
// It also counts VC contention: cycles where two input ports wanted the same output.
module tb_subnet_switch;
  import winoc_pkg::*;
  localparam int NP = SW_NP;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] subnet_id, pos;
  logic  [NP-1:0]          in_valid, out_valid, out_taken;
  flit_t [NP-1:0]          in_flit, out_flit;
  logic  [NP-1:0][NVC-1:0] in_vc_ready, out_vc_ready;

  subnet_switch dut (.*);
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

  // reference X-then-Y routing
  function automatic int exp_port(header_t h);
    int mx = pos % 4, my = pos / 4, dx = h.dst_local % 4, dy = h.dst_local / 4;
    if (h.dst_subnet != subnet_id) return 5;
    if (dx > mx) return 2;
    if (dx < mx) return 4;
    if (dy > my) return 3;
    if (dy < my) return 1;
    return 0;
  endfunction

  // scoreboard
  int exp_o   [int];     // packet id -> expected output port
  int exp_len [int];
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
  task automatic send_packet(input int p, input int len, input int dsub, input int dloc);
    int id;
    int v;
    header_t h;
    // tags are 8 bits: never reuse one that is still in flight
    while (exp_o.exists(next_id)) begin
      next_id = (next_id + 1) % 256;
      if (exp_o.size() > 200) @(negedge clk);
    end
    id = next_id;
    next_id = (next_id + 1) % 256;
    h = '0;
    h.tag = 8'(id); h.dst_subnet = 4'(dsub); h.dst_local = 4'(dloc);
    h.src_subnet = subnet_id; h.src_local = pos;
    exp_o[id] = exp_port(h);
    exp_len[id] = len;
    // wait for a free VC on this input port
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

  task automatic rand_dest(output int dsub, output int dloc);
    dsub = ($urandom_range(3, 0) == 0) ? int'($urandom_range(15, 0)) : int'(subnet_id);
    dloc = $urandom_range(15, 0);
  endtask

  initial begin
    in_valid = '0; in_flit = '0; out_vc_ready = '1;
    for (int o = 0; o < NP; o++) for (int v = 0; v < NVC; v++) cur_id[o][v] = -1;
    for (int cfg = 0; cfg < 2; cfg++) begin
      subnet_id = (cfg == 0) ? 4'd3 : 4'd9;
      pos = (cfg == 0) ? 4'd0 : 4'd6;
      rst_n = 0;
      stall = 0;
      repeat (3) @(posedge clk);
      rst_n = 1;
      @(negedge clk);
      // latency: single flit from the core port to the east neighbour
      begin
        int d = (int'(pos) % 4 == 3) ? int'(pos) - 1 : int'(pos) + 1;
        int expo = (int'(pos) % 4 == 3) ? 4 : 2;
        send_packet(0, 1, int'(subnet_id), d);
        #1;
        check(!out_valid[expo], "a head flit is routed in the cycle after it is stored");
        @(negedge clk);
        #1;
        check(out_valid[expo], "an unloaded switch forwards a head flit two cycles after it is stored");
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
                automatic int ds, dl;
                rand_dest(ds, dl);
                send_packet(pp, $urandom_range(6, 1), ds, dl);
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
    $display("sent=%0d delivered=%0d contention_cycles=%0d", sent, delivered, contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
