// End-to-end test of one fault-tolerant vertical link (35 forward + 3
// backward signals, 3 + 1 spare TSVs).
//
// For each scenario the testbench injects open defects into the TSV model,
// then acts as the tester: it runs the scan test through both link ends in two
// passes (crossbars straight, then all shifted onto the spares) with an
// all-ones vector, works out which pads failed, derives one repair code per
// cluster (or the disable fuse if a cluster has two faults), blows the fuses
// of both ends, leaves test mode and checks that random traffic crosses the
// link unchanged in both directions. Scenarios: no defect; one defect in every
// cluster at random positions (many trials, spares included); the example of a
// three-signal cluster's second pad; two defects in one cluster, where the
// link must clamp valid low and stall high; and a defect left unrepaired,
// which must corrupt the link (showing the repair is what fixes it).
module tb_ft_vertical_link;
  import noc3d_pkg::*;

  localparam int FW = FWD_W, FC = FWD_CLUSTERS, BW = BWD_W, BC = BWD_CLUSTERS;
  localparam int FP = FW + FC, BP = BW + BC;
  localparam int CFG = END_CFG_W;

  int checks = 0, failures = 0;
  int n_repaired = 0, n_disabled = 0, n_corrupt = 0, n_tests = 0;

  logic clk = 0, rst_n = 0;
  logic [FW-1:0] s_fwd = '0, r_fwd;
  logic [BW-1:0] s_bwd, r_bwd = '0;
  logic [1:0] test_en = '0, test_shift = '0, start = '0, capture = '0, tdi = '0, tdo, busy;
  logic [1:0] prog_en = '0, disabled;
  logic [1:0][CFG-1:0] prog_data = '0;
  logic [FP-1:0] open_fwd = '0;
  logic [BP-1:0] open_bwd = '0;

  ft_vertical_link dut (
    .clk, .rst_n, .s_fwd_i(s_fwd), .s_bwd_o(s_bwd), .r_fwd_o(r_fwd), .r_bwd_i(r_bwd),
    .test_en_i(test_en), .test_shift_i(test_shift), .start_i(start), .capture_i(capture),
    .tdi_i(tdi), .tdo_o(tdo), .test_busy_o(busy), .otp_prog_en_i(prog_en),
    .otp_prog_data_i(prog_data), .link_disabled_o(disabled),
    .open_fwd_i(open_fwd), .open_bwd_i(open_bwd));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Cluster c of a group of w signals in cc clusters: first signal, size.
  function automatic int cstart(int w, int cc, int c); return (c * w) / cc; endfunction
  function automatic int csize(int w, int cc, int c); return cstart(w, cc, c + 1) - cstart(w, cc, c); endfunction

  // Pads that carry a 1 when all of a group's signals are ones: pass 0
  // (straight) drives every regular pad, pass 1 (all shifted) drives every
  // pad including the spare, since a cluster's first pad keeps its signal.
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

  // One scan pass on both ends; returns the captured pad words.
  task automatic scan_pass(int pass, output logic [FP-1:0] cap_fwd, output logic [BP-1:0] cap_bwd);
    test_en = 2'b11; test_shift = {1'(pass), 1'(pass)};
    @(negedge clk);
    start = 2'b11;
    @(negedge clk);
    start = 2'b00;
    for (int k = 0; k < FW; k++) begin
      tdi = 2'b11;                // all-ones vector into both inject chains
      @(negedge clk);
    end
    tdi = 2'b00;
    while (busy != 0) @(negedge clk);
    repeat (2) @(negedge clk);    // propagation time across the tiers
    capture = 2'b11;
    @(negedge clk);
    capture = 2'b00;
    @(negedge clk);               // capture cycle
    cap_fwd = '0; cap_bwd = '0;
    for (int k = 0; k < FP; k++) begin
      cap_fwd[k] = tdo[1];
      if (k < BP) cap_bwd[k] = tdo[0];
      @(negedge clk);
    end
    n_tests++;
  endtask

  // Off-chip analysis: repair code per cluster from the failing pads.
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

  // Full tester flow; returns 1 if the link was disabled.
  task automatic test_and_repair(output bit dis);
    logic [FP-1:0] cf0, cf1;
    logic [BP-1:0] cb0, cb1;
    logic [63:0] bad_f, bad_b;
    logic [CFG-1:0] fc, bc;
    bit df, db;
    scan_pass(0, cf0, cb0);
    scan_pass(1, cf1, cb1);
    test_en = '0;
    bad_f = (driven_pads(FW, FC, 0) & ~64'(cf0)) | (driven_pads(FW, FC, 1) & ~64'(cf1));
    bad_b = (driven_pads(BW, BC, 0) & ~64'(cb0)) | (driven_pads(BW, BC, 1) & ~64'(cb1));
    check(bad_f[FP-1:0] == open_fwd, $sformatf("forward diagnosis %h vs defects %h", bad_f[FP-1:0], open_fwd));
    check(bad_b[BP-1:0] == open_bwd, $sformatf("backward diagnosis %h vs defects %h", bad_b[BP-1:0], open_bwd));
    fc = codes(FW, FC, bad_f, df);
    bc = codes(BW, BC, bad_b, db);
    dis = df | db;
    // end 0: out = forward, in = backward; end 1: out = backward, in = forward
    prog_data[0] = CFG'(fc[FC*REP_W-1:0]) | (CFG'(bc[BC*REP_W-1:0]) << (FC*REP_W)) | (CFG'(dis) << (CFG-1));
    prog_data[1] = CFG'(bc[BC*REP_W-1:0]) | (CFG'(fc[FC*REP_W-1:0]) << (BC*REP_W)) | (CFG'(dis) << (CFG-1));
    prog_en = 2'b11;
    @(negedge clk);
    prog_en = '0;
    if (dis) n_disabled++; else if (fc != 0 || bc != 0) n_repaired++;
  endtask

  // Random traffic: returns number of mismatching cycles.
  task automatic traffic(int cycles, output int bad);
    bad = 0;
    for (int t = 0; t < cycles; t++) begin
      s_fwd = {$urandom, $urandom};
      r_bwd = BW'($urandom);
      #1;
      if (r_fwd != s_fwd || s_bwd != r_bwd) bad++;
      @(negedge clk);
    end
  endtask

  // Fresh chip: fuses blank, scan chains reset.
  task automatic new_chip();
    rst_n = 0;
    dut.u_send.u_otp.fuse = '0;
    dut.u_recv.u_otp.fuse = '0;
    @(negedge clk);
    rst_n = 1;
    @(negedge clk);
  endtask

  initial begin
    bit dis;
    int bad;
    // 1. No defects.
    new_chip();
    test_and_repair(dis);
    check(!dis, "no defect: link enabled");
    traffic(50, bad);
    check(bad == 0, $sformatf("no defect: %0d bad cycles", bad));

    // 2. One open per cluster, random positions, spares included.
    for (int trial = 0; trial < 40; trial++) begin
      new_chip();
      open_fwd = '0; open_bwd = '0;
      for (int c = 0; c < FC; c++)
        open_fwd[cstart(FW, FC, c) + c + $urandom_range(0, csize(FW, FC, c))] = 1'b1;
      open_bwd[$urandom_range(0, BP - 1)] = 1'b1;
      test_and_repair(dis);
      check(!dis && disabled == 2'b00, "single faults per cluster: link enabled");
      traffic(40, bad);
      check(bad == 0, $sformatf("repaired link %h/%h: %0d bad cycles", open_fwd, open_bwd, bad));
    end

    // 3. Unrepaired defect corrupts the link.
    new_chip();
    open_fwd = '0; open_bwd = '0;
    open_fwd[5] = 1'b1;
    traffic(40, bad);
    check(bad > 0, "unrepaired open must corrupt traffic");
    if (bad > 0) n_corrupt++;

    // 4. Two opens in the first forward cluster: link disabled and clamped.
    new_chip();
    open_fwd = '0; open_bwd = '0;
    open_fwd[1] = 1'b1; open_fwd[7] = 1'b1;
    test_and_repair(dis);
    check(dis && disabled == 2'b11, "double fault: both ends disabled");
    for (int t = 0; t < 20; t++) begin
      s_fwd = {$urandom, $urandom} | (FW'(1) << FWD_VALID_BIT);
      r_bwd = '0;
      #1;
      check(r_fwd[FWD_VALID_BIT] == 1'b0, "disabled link: valid clamped low");
      check(s_bwd[BWD_STALL_BIT] == 1'b1, "disabled link: stall clamped high");
      @(negedge clk);
    end

    check(n_repaired > 0 && n_disabled > 0 && n_corrupt > 0 && n_tests > 0, "all mechanisms seen");
    $display("scan passes %0d, repaired links %0d, disabled links %0d", n_tests, n_repaired, n_disabled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
