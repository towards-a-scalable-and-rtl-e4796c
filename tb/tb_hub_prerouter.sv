// tb_hub_prerouter: for every pair of source hub and destination subnet, compares the
// pre-routing block with a breadth-first search over the hub graph (ring links both ways plus
// the 24 one-way wireless links) restricted to paths with at most one wireless link.
//   - 'hops' equals the shortest such path length
//   - the chosen route really has that length: ring distance to the link's source hub, one
//     wireless hop, ring distance to the destination
//   - when a wireless path is as short as the ring path, a wireless path is chosen
// It also reports the average hub-to-hub distance of the placement.
module tb_hub_prerouter;
  import winoc_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] src_hub, dst_subnet;
  logic use_wl;
  logic [4:0] link;
  logic [5:0] hops;

  hub_prerouter dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s src %0d dst %0d", what, src_hub, dst_subnet); end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rd(int a, int b);
    int cw = (b - a + 16) % 16;
    return (cw < 16 - cw) ? cw : 16 - cw;
  endfunction

  // BFS on states (hub, wireless hop used)
  function automatic int bfs(int s, int d);
    int dd [16][2];
    int fifo [$];
    for (int h = 0; h < 16; h++) begin dd[h][0] = -1; dd[h][1] = -1; end
    dd[s][0] = 0;
    fifo.push_back(s * 2);
    while (fifo.size() > 0) begin
      automatic int st = fifo.pop_front();
      automatic int h = st / 2, u = st % 2;
      automatic int nb [2] = '{(h + 1) % 16, (h + 15) % 16};
      foreach (nb[i]) if (dd[nb[i]][u] < 0) begin
        dd[nb[i]][u] = dd[h][u] + 1; fifo.push_back(nb[i] * 2 + u);
      end
      if (u == 0)
        for (int k = 0; k < NWL; k++)
          if (int'(WL_SRC[k]) == h && dd[WL_DST[k]][1] < 0) begin
            dd[WL_DST[k]][1] = dd[h][0] + 1; fifo.push_back(int'(WL_DST[k]) * 2 + 1);
          end
    end
    if (dd[d][1] >= 0 && dd[d][1] < dd[d][0]) return dd[d][1];
    return dd[d][0];
  endfunction

  initial begin
    int total = 0, n_wl = 0;
    for (int s = 0; s < 16; s++)
      for (int d = 0; d < 16; d++) begin
        int best;
        src_hub = 4'(s); dst_subnet = 4'(d);
        #1;
        best = bfs(s, d);
        check(int'(hops) == best, "shortest path length");
        if (use_wl) begin
          check(int'(link) < NWL, "link index in range");
          check(rd(s, int'(WL_SRC[link])) + 1 + rd(int'(WL_DST[link]), d) == int'(hops),
                "chosen wireless path has the reported length");
          n_wl++;
        end else begin
          check(rd(s, d) == int'(hops), "ring path has the reported length");
          // no wireless path of equal length may exist
          for (int k = 0; k < NWL; k++)
            check(rd(s, int'(WL_SRC[k])) + 1 + rd(int'(WL_DST[k]), d) > rd(s, d),
                  "wireless preferred on a tie");
        end
        if (s != d) total += int'(hops);
      end
    check(n_wl > 0, "some routes use wireless links");
    $display("average hub distance = %0d/240 = %f, routes using a wireless link: %0d", total,
             real'(total) / 240.0, n_wl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
