// End-to-end test of the two-tier NoC at its default parameters.
//
// Phase 1 (manufactured chip with random TSV opens, at most one per cluster,
// on both vertical links): the testbench plays the tester (two-pass scan test
// of each link through its four scan chains, off-chip diagnosis, fuse
// programming) and then all twelve cores exchange random packets, many of
// which cross between tiers. A scoreboard checks that every packet reaches the
// core it was routed to, whole and in order per source, with the route fully
// consumed. Phase 2 (a second chip whose bottom-to-top link has two opens in
// one cluster): that link is disabled by its fuses; a packet routed over it
// must never arrive, while traffic that avoids it is still delivered.
//
// Counted mechanisms (each must occur): scan test passes, repaired links,
// disabled link, packets crossing each vertical link, stall on a vertical
// link, stall by a core's input, wormhole packets with payload, and the
// forwarded clock and reset seen on the receiving tier.
module tb_noc3d_top;
  import noc3d_pkg::*;

  localparam int NC = 12, NPKT = 40;
  localparam int FW = FWD_W, FC = FWD_CLUSTERS, BW = BWD_W, BC = BWD_CLUSTERS;
  localparam int FP = FW + FC, BP = BW + BC, CFG = END_CFG_W;

  int checks = 0, failures = 0;
  int n_scan = 0, n_repair = 0, n_disable = 0, n_down = 0, n_up = 0;
  int n_aux = 0, n_vstall = 0, n_cstall = 0, n_worm = 0, n_fclk = 0, received = 0, n_sent = 0;

  logic clk = 0, rst_n = 0;
  flit_t [NC-1:0] core_in_flit = '0, core_out_flit;
  logic  [NC-1:0] core_in_valid = '0, core_in_stall, core_out_valid, core_out_stall = '0;
  logic  [1:0][1:0] vl_test_en = '0, vl_test_shift = '0, vl_start = '0, vl_capture = '0, vl_tdi = '0;
  logic  [1:0][1:0] vl_tdo, vl_test_busy, vl_otp_prog_en = '0, vl_link_disabled;
  logic  [1:0][1:0][CFG-1:0] vl_otp_prog_data = '0;
  logic  [1:0][FP-1:0] vl_open_fwd = '0;
  logic  [1:0][BP-1:0] vl_open_bwd = '0;
  logic  [1:0] vl_fwd_clk_o, vl_fwd_rst_n_o;
  logic  [1:0][BWD_AUX_W-1:0] vl_aux_i = '0, vl_aux_o;

  noc3d_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- tester
  function automatic int cstart(int w, int cc, int c); return (c * w) / cc; endfunction
  function automatic int csize(int w, int cc, int c); return cstart(w, cc, c + 1) - cstart(w, cc, c); endfunction

  function automatic logic [63:0] driven_pads(int w, int cc, int pass);
    logic [63:0] m;
    m = '0;
    for (int c = 0; c < cc; c++) begin
      int b, n;
      b = cstart(w, cc, c) + c; n = csize(w, cc, c);
      for (int j = 0; j < n; j++) m[b + j] = 1'b1;
      if (pass == 1) m[b + n] = 1'b1;
    end
    return m;
  endfunction

  function automatic logic [CFG-1:0] codes(int w, int cc, logic [63:0] bad, output bit dis);
    logic [CFG-1:0] r;
    r = '0; dis = 0;
    for (int c = 0; c < cc; c++) begin
      int b, n, nbad, pos;
      b = cstart(w, cc, c) + c; n = csize(w, cc, c);
      nbad = 0; pos = 0;
      for (int j = 0; j <= n; j++) if (bad[b + j]) begin nbad++; pos = j; end
      if (nbad > 1) dis = 1;
      else if (nbad == 1 && pos < n) r[c*REP_W +: REP_W] = REP_W'(pos + 1);
    end
    return r;
  endfunction

  task automatic scan_pass(int l, int pass, output logic [FP-1:0] cap_fwd, output logic [BP-1:0] cap_bwd);
    vl_test_en[l] = 2'b11; vl_test_shift[l] = {1'(pass), 1'(pass)};
    @(negedge clk);
    vl_start[l] = 2'b11;
    @(negedge clk);
    vl_start[l] = 2'b00;
    for (int k = 0; k < FW; k++) begin vl_tdi[l] = 2'b11; @(negedge clk); end
    vl_tdi[l] = 2'b00;
    while (vl_test_busy[l] != 0) @(negedge clk);
    repeat (2) @(negedge clk);
    vl_capture[l] = 2'b11;
    @(negedge clk);
    vl_capture[l] = 2'b00;
    @(negedge clk);
    cap_fwd = '0; cap_bwd = '0;
    for (int k = 0; k < FP; k++) begin
      cap_fwd[k] = vl_tdo[l][1];
      if (k < BP) cap_bwd[k] = vl_tdo[l][0];
      @(negedge clk);
    end
    n_scan++;
  endtask

  task automatic test_and_repair(int l, output bit dis);
    logic [FP-1:0] cf0, cf1;
    logic [BP-1:0] cb0, cb1;
    logic [63:0] bad_f, bad_b;
    logic [CFG-1:0] fc, bc;
    bit df, db;
    scan_pass(l, 0, cf0, cb0);
    scan_pass(l, 1, cf1, cb1);
    vl_test_en[l] = '0;
    bad_f = (driven_pads(FW, FC, 0) & ~64'(cf0)) | (driven_pads(FW, FC, 1) & ~64'(cf1));
    bad_b = (driven_pads(BW, BC, 0) & ~64'(cb0)) | (driven_pads(BW, BC, 1) & ~64'(cb1));
    check(bad_f[FP-1:0] == vl_open_fwd[l] && bad_b[BP-1:0] == vl_open_bwd[l],
          $sformatf("link %0d diagnosis", l));
    fc = codes(FW, FC, bad_f, df);
    bc = codes(BW, BC, bad_b, db);
    dis = df | db;
    vl_otp_prog_data[l][0] = CFG'(fc[FC*REP_W-1:0]) | (CFG'(bc[BC*REP_W-1:0]) << (FC*REP_W)) | (CFG'(dis) << (CFG-1));
    vl_otp_prog_data[l][1] = CFG'(bc[BC*REP_W-1:0]) | (CFG'(fc[FC*REP_W-1:0]) << (BC*REP_W)) | (CFG'(dis) << (CFG-1));
    vl_otp_prog_en[l] = 2'b11;
    @(negedge clk);
    vl_otp_prog_en[l] = '0;
    if (dis) n_disable++; else if (fc != 0 || bc != 0) n_repair++;
  endtask

  // --------------------------------------------------------------- traffic
  // Output ports along the path from switch a to switch b, then the core port.
  function automatic logic [ROUTE_W-1:0] route_of(int src_core, int dst_core, int tag, output int hops,
                                                   output int vdir);
    int a, b, x, hop;
    logic [ROUTE_W-1:0] r;
    a = src_core % 6; b = dst_core % 6;
    r = '0; hop = 0; vdir = -1;
    x = a % 3;
    if (a / 3 != b / 3) begin
      // to the central switch, then vertical
      if (x == 0) begin r[3*hop +: 3] = 3'd2; hop++; end
      if (x == 2) begin r[3*hop +: 3] = 3'd2; hop++; end
      r[3*hop +: 3] = 3'd4; hop++;
      vdir = (a / 3 == 0) ? 0 : 1;
      x = 1;
    end
    // along the row to b
    while (x != b % 3) begin
      if (x == 0)      begin r[3*hop +: 3] = 3'd2; x = 1; end
      else if (x == 2) begin r[3*hop +: 3] = 3'd2; x = 1; end
      else if (b % 3 == 0) begin r[3*hop +: 3] = 3'd2; x = 0; end
      else             begin r[3*hop +: 3] = 3'd3; x = 2; end
      hop++;
    end
    r[3*hop +: 3] = (dst_core < 6) ? 3'd0 : 3'd1; hop++;
    r |= ROUTE_W'(tag) << (3*hop);
    hops = hop;
    return r;
  endfunction

  typedef struct { int src; int len; int hops; flit_t f[16]; } pkt_t;
  pkt_t exp_q [NC][NC][$];   // [dst][src]

  task automatic send_flit(int p, flit_t f);
    core_in_flit[p] = f; core_in_valid[p] = 1'b1;
    forever begin
      @(negedge clk); #4;
      if (!core_in_stall[p]) begin @(posedge clk); #1; break; end
      n_cstall++;
    end
    core_in_valid[p] = 1'b0;
  endtask

  task automatic send_packet(int s, int d, int seq, int force_len = -1);
    pkt_t k;
    int hops, vdir;
    logic [ROUTE_W-1:0] r;
    k.src = s; k.len = (force_len >= 0) ? force_len : $urandom_range(0, 15);
    r = route_of(s, d, (seq << 4) | s, hops, vdir);
    k.hops = hops;
    k.f[0] = make_header(LEN_W'(k.len), r);
    for (int j = 1; j <= k.len; j++) k.f[j] = {4'(s), 4'(d), 8'(seq), 16'($urandom)};
    exp_q[d][s].push_back(k);
    if (vdir == 0) n_down++;
    if (vdir == 1) n_up++;
    if (k.len > 0) n_worm++;
    n_sent++;
    for (int j = 0; j <= k.len; j++) begin
      send_flit(s, k.f[j]);
      if ($urandom_range(0, 7) == 0) begin repeat ($urandom_range(1, 4)) @(posedge clk); #1; end
    end
  endtask

  task automatic core_source(int s, int npkt, int only_tier);
    for (int n = 0; n < npkt; n++) begin
      int d;
      do d = $urandom_range(0, NC - 1);
      while (d == s || (only_tier >= 0 && (d % 6) / 3 != only_tier));
      send_packet(s, d, n);
    end
  endtask

  task automatic core_sink(int o);
    bit in_pkt = 0;
    int idx = 0;
    pkt_t k;
    forever begin
      @(negedge clk);
      core_out_stall[o] = ($urandom_range(0, 4) == 0);
      #4;
      if (core_out_valid[o] && !core_out_stall[o]) begin
        flit_t f;
        f = core_out_flit[o];
        if (!in_pkt) begin
          int src;
          src = int'(f[3:0]);
          if (src < NC && exp_q[o][src].size() > 0) begin
            k = exp_q[o][src].pop_front();
            check(f == make_header(k.f[0][31:28], ROUTE_W'(k.f[0][ROUTE_W-1:0] >> (3 * k.hops))),
                  $sformatf("header %h at core %0d", f, o));
            idx = 1;
            in_pkt = (k.len != 0);
            if (k.len == 0) received++;
          end else begin
            check(0, $sformatf("unexpected header %h at core %0d", f, o));
          end
        end else begin
          check(f == k.f[idx], $sformatf("payload %h exp %h at core %0d", f, k.f[idx], o));
          idx++;
          if (idx > k.len) begin in_pkt = 0; received++; end
        end
      end
    end
  endtask

  // Vertical link stall and forwarded clock monitors.
  always @(negedge clk) begin
    for (int l = 0; l < 2; l++) begin
      int ss;
      ss = (l == 0) ? 1 : 4;
      if (dut.sw_out_valid[ss][4] && dut.sw_out_stall[ss][4] && !vl_link_disabled[l][0]) n_vstall++;
    end
  end
  // Sideband wires of each working link carry random values back across.
  always @(negedge clk) begin
    for (int l = 0; l < 2; l++) begin
      if (vl_test_en[l] == 2'b00 && vl_link_disabled[l] == 2'b00 && rst_n) begin
        check(vl_aux_o[l] == vl_aux_i[l], $sformatf("link %0d sideband", l));
        n_aux++;
      end
      vl_aux_i[l] = BWD_AUX_W'($urandom);
    end
  end
  always @(posedge clk) #1 if (vl_fwd_clk_o == 2'b11 && vl_fwd_rst_n_o == 2'b11) n_fclk++;
  // Between edges the forwarded clock of a working link must be low and its
  // forwarded reset must follow the real one.
  always @(negedge clk) begin
    #2;
    for (int l = 0; l < 2; l++)
      if (vl_test_en[l] == 2'b00 && vl_link_disabled[l] == 2'b00 && rst_n)
        check(vl_fwd_clk_o[l] == 1'b0 && vl_fwd_rst_n_o[l] == rst_n,
              $sformatf("link %0d forwarded clock/reset", l));
  end

  task automatic wait_drained(int limit);
    int t = 0;
    while (received < n_sent && t < limit) begin @(posedge clk); t++; end
  endtask

  initial begin
    bit dis;
    for (int o = 0; o < NC; o++) fork automatic int oo = o; core_sink(oo); join_none
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- Phase 1: one open per cluster on link 0, one forward open on link 1.
    for (int c = 0; c < FC; c++)
      vl_open_fwd[0][cstart(FW, FC, c) + c + $urandom_range(0, csize(FW, FC, c) - 1)] = 1'b1;
    vl_open_bwd[0][$urandom_range(0, BW - 1)] = 1'b1;
    vl_open_fwd[1][$urandom_range(0, FP - 1)] = 1'b1;
    test_and_repair(0, dis);
    check(!dis, "link 0 repaired, not disabled");
    test_and_repair(1, dis);
    check(!dis, "link 1 repaired, not disabled");
    @(posedge clk); #1;
    fork
      core_source(0, NPKT, -1);  core_source(1, NPKT, -1);  core_source(2, NPKT, -1);
      core_source(3, NPKT, -1);  core_source(4, NPKT, -1);  core_source(5, NPKT, -1);
      core_source(6, NPKT, -1);  core_source(7, NPKT, -1);  core_source(8, NPKT, -1);
      core_source(9, NPKT, -1);  core_source(10, NPKT, -1); core_source(11, NPKT, -1);
    join
    wait_drained(5000);
    check(received == n_sent, $sformatf("phase 1: %0d of %0d packets delivered", received, n_sent));

    // ---- Phase 2: new chip, link 1 (bottom -> top) has two opens in one cluster.
    rst_n = 0;
    dut.g_vl[0].u_link.u_send.u_otp.fuse = '0;
    dut.g_vl[0].u_link.u_recv.u_otp.fuse = '0;
    dut.g_vl[1].u_link.u_send.u_otp.fuse = '0;
    dut.g_vl[1].u_link.u_recv.u_otp.fuse = '0;
    vl_open_fwd = '0; vl_open_bwd = '0;
    vl_open_fwd[1][13] = 1'b1; vl_open_fwd[1][20] = 1'b1;
    @(negedge clk);
    rst_n = 1;
    test_and_repair(0, dis);
    check(!dis, "phase 2: link 0 healthy");
    test_and_repair(1, dis);
    check(dis && vl_link_disabled[1] == 2'b11, "phase 2: link 1 disabled");
    received = 0; n_sent = 0;
    @(posedge clk); #1;
    // One short packet from P3 (bottom) to P0 (top) must be held back; the
    // top tier, the top-to-bottom link and bottom-tier traffic that does not
    // queue behind it (sources on SW5) keep working.
    fork
      send_packet(3, 0, 0, 2);
      core_source(0, 10, -1); core_source(2, 10, -1); core_source(8, 10, -1);
      core_source(5, 10, 1);  core_source(11, 10, 1);
    join
    wait_drained(3000);
    check(received == n_sent - 1, $sformatf("phase 2: %0d of %0d delivered", received, n_sent - 1));
    check(exp_q[0][3].size() == 1, "phase 2: packet over the disabled link held back");

    check(n_scan > 0, "scan test ran");
    check(n_repair > 0, "link repaired");
    check(n_disable > 0, "link disabled");
    check(n_down > 0 && n_up > 0, "packets crossed both vertical links");
    check(n_vstall > 0, "stall on a vertical link");
    check(n_cstall > 0, "core input stalled");
    check(n_worm > 0, "multi-flit packets");
    check(n_fclk > 0, "forwarded clock and reset seen");
    check(n_aux > 0, "sideband wires checked");
    $display("scan %0d repair %0d disable %0d down %0d up %0d vstall %0d cstall %0d worm %0d",
             n_scan, n_repair, n_disable, n_down, n_up, n_vstall, n_cstall, n_worm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
