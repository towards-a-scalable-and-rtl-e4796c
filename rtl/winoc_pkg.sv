// winoc_pkg: types, constants and shared functions of the hierarchical wireless NoC.
//
// System shape (the main configuration): 256 cores in 16 subnets of 16 cores. Each subnet is
// a 4x4 mesh of switches, and every switch has a direct link to the subnet's hub. The 16 hubs
// form a bidirectional ring and are also joined by 24 one-way wireless links, each using one of
// the 24 laser frequencies. Flits are 32 bits wide; packets move by wormhole switching over
// 4 virtual channels (VCs) per port, each 2 flits deep.
//
// Also here:
//  * the codes: the (39,32) Hsiao SEC-DED code used twice by JTEC-SQED on wired links; the
//    (38,32) shortened Hamming code and the (7,4) Hamming code that form the wireless product code;
//  * the wireless link table and the routing functions: e-cube routing in the mesh, and at the
//    hubs the ring routing plus the one-time pre-routing at the source hub.
//
// Our own choices (the text does not fix them): the header flit layout, the flit-type/VC
// sideband beside the 32 data bits, the Hsiao column set, and the 24-link placement. The
// placement came from simulated annealing under single-wireless-hop routing. At most two links
// leave any hub and at most two arrive, so the average hub-to-hub distance is 2.0 hops.
package winoc_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned FLIT_W     = 32;  // flit width
  localparam int unsigned NVC        = 4;   // virtual channels per port
  localparam int unsigned VC_DEPTH   = 2;   // flits per VC buffer
  localparam int unsigned NSUBNET    = 16;  // subnets = hubs
  localparam int unsigned MESH_X     = 4;   // subnet mesh is MESH_X x MESH_Y
  localparam int unsigned MESH_Y     = 4;
  localparam int unsigned SUBNET_SZ  = MESH_X * MESH_Y;
  localparam int unsigned NCORE      = NSUBNET * SUBNET_SZ;
  localparam int unsigned NWL        = 24;  // wireless links
  localparam int unsigned NFREQ      = 24;  // laser frequencies shared by the links
  localparam int unsigned WL_CH      = NFREQ / NWL; // frequency channels per link
  localparam int unsigned SLOTS_PER_CYCLE = 4;    // 0.1 ns slots in a 0.4 ns (2.5 GHz) cycle
  localparam int unsigned WL_PORTS   = 2;   // wireless in/out ports per hub

  // port numbering of a subnet switch
  localparam int unsigned SW_NP   = 6;
  localparam int unsigned SW_CORE = 0, SW_N = 1, SW_E = 2, SW_S = 3, SW_W = 4, SW_HUB = 5;
  // port numbering of a hub: 0..15 subnet switches, then ring, then wireless
  localparam int unsigned HUB_NP  = SUBNET_SZ + 2 + WL_PORTS;
  localparam int unsigned HUB_CW  = SUBNET_SZ;      // towards hub h+1
  localparam int unsigned HUB_CCW = SUBNET_SZ + 1;  // towards hub h-1
  localparam int unsigned HUB_WL0 = SUBNET_SZ + 2;

  // ---------------------------------------------------------------- flits
  typedef enum logic [1:0] {FT_BODY = 2'd0, FT_HEAD = 2'd1, FT_TAIL = 2'd2, FT_SINGLE = 2'd3} ftype_e;

  typedef struct packed {
    ftype_e            ftype;
    logic [1:0]        vc;
    logic [FLIT_W-1:0] data;
  } flit_t;

  localparam int unsigned SB_W = 4;  // sideband: flit type + VC

  // Header flit data field layout
  typedef struct packed {
    logic [7:0] tag;        // free for the cores (packet id)
    logic       wl_done;    // the wireless hop has been taken
    logic [4:0] wl_link;    // wireless link chosen by the source hub
    logic       use_wl;     // the path uses wl_link
    logic       routed;     // the source hub has pre-routed this packet
    logic [3:0] src_subnet;
    logic [3:0] src_local;
    logic [3:0] dst_subnet;
    logic [3:0] dst_local;
  } header_t;

  function automatic logic is_head(ftype_e t);
    return t == FT_HEAD || t == FT_SINGLE;
  endfunction
  function automatic logic is_tail(ftype_e t);
    return t == FT_TAIL || t == FT_SINGLE;
  endfunction

  // ---------------------------------------------------------------- wireless link table
  // link k runs from hub WL_SRC[k] to hub WL_DST[k]
  localparam logic [3:0] WL_SRC [NWL] = '{4'd0, 4'd1, 4'd2, 4'd3, 4'd3, 4'd4, 4'd5, 4'd5,
                                          4'd6, 4'd6, 4'd7, 4'd8, 4'd8, 4'd9, 4'd9, 4'd10,
                                          4'd11, 4'd11, 4'd12, 4'd12, 4'd13, 4'd14, 4'd15, 4'd15};
  localparam logic [3:0] WL_DST [NWL] = '{4'd12, 4'd6, 4'd10, 4'd7, 4'd13, 4'd11, 4'd0, 4'd9,
                                          4'd2, 4'd14, 4'd12, 4'd3, 4'd15, 4'd1, 4'd5, 4'd14,
                                          4'd0, 4'd6, 4'd2, 4'd8, 4'd5, 4'd10, 4'd3, 4'd8};

  // slot of link k among the outgoing links of its source hub (0 or 1)
  function automatic int unsigned wl_out_slot(int unsigned k);
    int unsigned s = 0;
    for (int unsigned j = 0; j < NWL; j++)
      if (j < k && WL_SRC[j] == WL_SRC[k]) s++;
    return s;
  endfunction
  // slot of link k among the incoming links of its destination hub (0 or 1)
  function automatic int unsigned wl_in_slot(int unsigned k);
    int unsigned s = 0;
    for (int unsigned j = 0; j < NWL; j++)
      if (j < k && WL_DST[j] == WL_DST[k]) s++;
    return s;
  endfunction
  // link leaving hub h on slot s, or NWL if none
  function automatic int unsigned wl_link_out(int unsigned h, int unsigned s);
    for (int unsigned j = 0; j < NWL; j++)
      if (WL_SRC[j] == 4'(h) && wl_out_slot(j) == s) return j;
    return NWL;
  endfunction
  // link arriving at hub h on slot s, or NWL if none
  function automatic int unsigned wl_link_in(int unsigned h, int unsigned s);
    for (int unsigned j = 0; j < NWL; j++)
      if (WL_DST[j] == 4'(h) && wl_in_slot(j) == s) return j;
    return NWL;
  endfunction

  // ---------------------------------------------------------------- ring helpers
  function automatic logic [4:0] ring_dist(logic [3:0] a, logic [3:0] b);
    logic [3:0] cw = b - a;   // hops going clockwise (mod 16)
    logic [3:0] ccw = a - b;
    return (cw <= ccw) ? {1'b0, cw} : {1'b0, ccw};
  endfunction
  // ring output port of hub a towards hub b (a != b); ties go clockwise
  function automatic int unsigned ring_port(logic [3:0] a, logic [3:0] b);
    logic [3:0] cw = b - a;
    logic [3:0] ccw = a - b;
    return (cw <= ccw) ? HUB_CW : HUB_CCW;
  endfunction

  // Pre-routing at the source hub: compare the all-ring path with every path that uses a
  // single wireless link (ring to the link's source hub, the link, ring to the destination).
  // The shortest wins; on equal length the wireless path wins.
  typedef struct packed {
    logic       use_wl;
    logic [4:0] link;
    logic [5:0] hops;
  } preroute_t;

  function automatic preroute_t preroute(logic [3:0] src, logic [3:0] dst);
    preroute_t r;
    logic [5:0] h;
    r.use_wl = 1'b0;
    r.link   = '0;
    r.hops   = {1'b0, ring_dist(src, dst)};
    for (int unsigned k = 0; k < NWL; k++) begin
      h = 6'(ring_dist(src, WL_SRC[k])) + 6'd1 + 6'(ring_dist(WL_DST[k], dst));
      if (h < r.hops || (h == r.hops && !r.use_wl)) begin
        r.use_wl = 1'b1;
        r.link   = 5'(k);
        r.hops   = h;
      end
    end
    return r;
  endfunction

  // ---------------------------------------------------------------- routing functions
  // e-cube (X first, then Y) routing in a subnet switch at mesh position 'me'
  function automatic int unsigned route_switch(logic [3:0] my_subnet, logic [3:0] me, header_t h);
    logic [1:0] mx, my, dx, dy;
    if (h.dst_subnet != my_subnet) return SW_HUB;
    mx = me[1:0]; my = me[3:2];
    dx = h.dst_local[1:0]; dy = h.dst_local[3:2];
    if (dx > mx) return SW_E;
    if (dx < mx) return SW_W;
    if (dy > my) return SW_S;
    if (dy < my) return SW_N;
    return SW_CORE;
  endfunction

  // hub routing: output port for a header at hub 'me'. For a packet leaving its own subnet the
  // caller first fills use_wl/wl_link from the pre-routing block.
  function automatic int unsigned route_hub(logic [3:0] me, header_t h);
    logic [3:0] tgt;
    int unsigned k;
    if (h.dst_subnet == me) return 32'(h.dst_local);
    if (h.use_wl && !h.wl_done) begin
      k = 32'(h.wl_link);
      tgt = WL_SRC[k];
      if (tgt == me) return HUB_WL0 + wl_out_slot(k);
      return ring_port(me, tgt);
    end
    return ring_port(me, h.dst_subnet);
  endfunction

  // ---------------------------------------------------------------- Hsiao (39,32) SEC-DED
  // Data column i is the i-th 7-bit pattern of weight three in increasing order, skipping
  // 7'b0000111, 7'b0011100 and 7'b1110000 so that the row weights stay balanced (13..14 data
  // bits per check). Check bit j has the unit column. Codeword: [31:0] data, [38:32] checks.
  typedef logic [6:0] hsiao_cols_t [32];
  function automatic hsiao_cols_t gen_hsiao_cols();
    hsiao_cols_t c;
    int unsigned n = 0;
    for (int unsigned v = 0; v < 128; v++)
      if ($countones(7'(v)) == 3 && v != 7 && v != 28 && v != 112 && n < 32) begin
        c[n] = 7'(v);
        n++;
      end
    return c;
  endfunction
  localparam hsiao_cols_t HSIAO_COL = gen_hsiao_cols();

  // row masks of the data part of the Hsiao H matrix: check bit r covers data bit i when
  // HSIAO_COL[i][r] is set
  typedef logic [31:0] hsiao_rows_t [7];
  function automatic hsiao_rows_t gen_hsiao_rows();
    hsiao_rows_t m;
    int unsigned n = 0;
    for (int unsigned r = 0; r < 7; r++) m[r] = '0;
    for (int unsigned v = 0; v < 128; v++)
      if ($countones(7'(v)) == 3 && v != 7 && v != 28 && v != 112 && n < 32) begin
        for (int unsigned r = 0; r < 7; r++) m[r] = m[r] | (32'((v >> r) & 1) << n);
        n++;
      end
    return m;
  endfunction
  localparam hsiao_rows_t HSIAO_ROW = gen_hsiao_rows();

  function automatic logic [38:0] hsiao_encode(logic [31:0] d);
    logic [6:0] c;
    for (int unsigned r = 0; r < 7; r++) c[r] = ^(d & HSIAO_ROW[r]);
    return {c, d};
  endfunction

  function automatic logic [6:0] hsiao_syndrome(logic [38:0] w);
    logic [6:0] s;
    for (int unsigned r = 0; r < 7; r++) s[r] = w[32 + r] ^ (^(w[31:0] & HSIAO_ROW[r]));
    return s;
  endfunction

  // single error correction of the data part; ok = 0 when the syndrome matches no column
  typedef struct packed {
    logic [31:0] data;
    logic        ok;
  } sec_result_t;

  function automatic sec_result_t hsiao_correct(logic [38:0] w, logic [6:0] s);
    sec_result_t r;
    r.data = w[31:0];
    r.ok   = (s == 7'd0) || ($countones(s) == 1);
    for (int unsigned i = 0; i < 32; i++)
      if (s == HSIAO_COL[i]) begin
        r.data[i] = ~w[i];
        r.ok      = 1'b1;
      end
    return r;
  endfunction

  // ---------------------------------------------------------------- (38,32) shortened Hamming
  // Classic positional code: codeword bit p-1 holds position p (1..38); the checks sit at
  // positions 1,2,4,8,16,32 and the data bits fill the other positions in order.
  typedef logic [5:0] ham38_pos_t [32];
  function automatic ham38_pos_t gen_ham38_pos();
    ham38_pos_t t;
    int unsigned n = 0;
    for (int unsigned p = 1; p <= 38; p++)
      if ((p & (p - 1)) != 0) begin
        t[n] = 6'(p);
        n++;
      end
    return t;
  endfunction
  localparam ham38_pos_t HAM38_POS = gen_ham38_pos();  // position (1..38) of data bit i

  function automatic logic [37:0] ham38_encode(logic [31:0] d);
    logic [37:0] w = '0;
    logic [5:0]  s = '0;
    for (int unsigned i = 0; i < 32; i++) begin
      w[int'(HAM38_POS[i]) - 1] = d[i];
      if (d[i]) s ^= HAM38_POS[i];
    end
    for (int unsigned j = 0; j < 6; j++) w[(1 << j) - 1] = s[j];
    return w;
  endfunction

  function automatic logic [31:0] ham38_data(logic [37:0] w);
    logic [31:0] d;
    for (int unsigned i = 0; i < 32; i++) d[i] = w[int'(HAM38_POS[i]) - 1];
    return d;
  endfunction

  // single error correction: returns the corrected codeword
  function automatic logic [37:0] ham38_correct(logic [37:0] w);
    logic [5:0] s = '0;
    logic [37:0] r = w;
    for (int unsigned p = 1; p <= 38; p++)
      if (w[p-1]) s ^= 6'(p);
    for (int unsigned p = 1; p <= 38; p++)
      if (s == 6'(p)) r[p-1] = ~w[p-1];
    return r;
  endfunction

  // ---------------------------------------------------------------- (7,4) Hamming
  // positions 1..7 = p1 p2 d0 p3 d1 d2 d3. Returns {p3,p2,p1} for data d[3:0].
  function automatic logic [2:0] ham74_parity(logic [3:0] d);
    return {d[1] ^ d[2] ^ d[3], d[0] ^ d[2] ^ d[3], d[0] ^ d[1] ^ d[3]};
  endfunction

  // single error correction of the data part; p = {p3,p2,p1}
  function automatic logic [3:0] ham74_correct(logic [3:0] d, logic [2:0] p);
    logic [2:0] s = p ^ ham74_parity(d);   // syndrome = position of the error
    logic [3:0] r = d;
    case (s)
      3'd3: r[0] = ~d[0];
      3'd5: r[1] = ~d[1];
      3'd6: r[2] = ~d[2];
      3'd7: r[3] = ~d[3];
      default: ;
    endcase
    return r;
  endfunction

  // ---------------------------------------------------------------- wireless column
  // One column of the product code as sent over the air: the (38,32) codeword of a flit plus
  // a 5-bit sideband {valid, ftype, vc}; the sideband is protected by the (7,4) time code only.
  localparam int unsigned WSB_W  = 5;
  localparam int unsigned WCOL_W = 38 + WSB_W;

endpackage
