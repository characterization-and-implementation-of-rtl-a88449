// Test harness for one ft_vertical_link configuration (FC forward and BC
// backward spare TSVs), used by tb_spare_configs.
//
// Runs NTRIAL manufactured-chip trials. Each trial clears the fuses, puts up to
// three random open defects anywhere in the link's TSVs, then acts as the
// tester: two scan passes (crossbars straight, then shifted), diagnosis,
// repair codes or the disable fuse, fuse programming. The link must come out
// working (random traffic crosses unchanged) exactly when no cluster has more
// than one defect, and disabled with flow control clamped otherwise. Reports
// its counts when done_o rises.
module ft_link_trial
  import noc3d_pkg::*;
#(
  parameter int FC = 3,
  parameter int BC = 1,
  parameter int NTRIAL = 50
) (
  input  logic clk,
  output logic done_o,
  output int   checks_o,
  output int   failures_o,
  output int   working_o
);

  localparam int FW = FWD_W, BW = BWD_W;
  localparam int FP = FW + FC, BP = BW + BC;
  localparam int CFG = (FC + BC) * REP_W + 1;

  logic rst_n = 0;
  logic [FW-1:0] s_fwd = '0, r_fwd;
  logic [BW-1:0] s_bwd, r_bwd = '0;
  logic [1:0] test_en = '0, test_shift = '0, start = '0, capture = '0, tdi = '0, tdo, busy;
  logic [1:0] prog_en = '0, disabled;
  logic [1:0][CFG-1:0] prog_data = '0;
  logic [FP-1:0] open_fwd = '0;
  logic [BP-1:0] open_bwd = '0;

  ft_vertical_link #(.FWD_C(FC), .BWD_C(BC)) dut (
    .clk, .rst_n, .s_fwd_i(s_fwd), .s_bwd_o(s_bwd), .r_fwd_o(r_fwd), .r_bwd_i(r_bwd),
    .test_en_i(test_en), .test_shift_i(test_shift), .start_i(start), .capture_i(capture),
    .tdi_i(tdi), .tdo_o(tdo), .test_busy_o(busy), .otp_prog_en_i(prog_en),
    .otp_prog_data_i(prog_data), .link_disabled_o(disabled),
    .open_fwd_i(open_fwd), .open_bwd_i(open_bwd));

  initial begin
    done_o = 0; checks_o = 0; failures_o = 0; working_o = 0;
  end

  task automatic check(bit cond, string msg);
    checks_o++;
    if (!cond) begin
      failures_o++;
      if (failures_o < 10) $display("FAIL [%0d+%0d spares] %s", FC, BC, msg);
    end
  endtask

  function automatic int cstart(int w, int cc, int c); return (c * w) / cc; endfunction
  function automatic int csize(int w, int cc, int c); return cstart(w, cc, c + 1) - cstart(w, cc, c); endfunction

  function automatic logic [127:0] driven_pads(int w, int cc, int pass);
    logic [127:0] m;
    m = '0;
    for (int c = 0; c < cc; c++) begin
      int b, n;
      b = cstart(w, cc, c) + c; n = csize(w, cc, c);
      for (int j = 0; j < n; j++) m[b + j] = 1'b1;
      if (pass == 1) m[b + n] = 1'b1;
    end
    return m;
  endfunction

  // Repair codes of a group; nbad_max returns the worst cluster's fault count.
  function automatic logic [CFG-1:0] codes(int w, int cc, logic [127:0] bad, output int nbad_max);
    logic [CFG-1:0] r;
    r = '0; nbad_max = 0;
    for (int c = 0; c < cc; c++) begin
      int b, n, nbad, pos;
      b = cstart(w, cc, c) + c; n = csize(w, cc, c);
      nbad = 0; pos = 0;
      for (int j = 0; j <= n; j++) if (bad[b + j]) begin nbad++; pos = j; end
      if (nbad > nbad_max) nbad_max = nbad;
      if (nbad == 1 && pos < n) r[c*REP_W +: REP_W] = REP_W'(pos + 1);
    end
    return r;
  endfunction

  task automatic scan_pass(int pass, output logic [FP-1:0] cf, output logic [BP-1:0] cb);
    test_en = 2'b11; test_shift = {1'(pass), 1'(pass)};
    @(negedge clk); start = 2'b11;
    @(negedge clk); start = 2'b00;
    for (int k = 0; k < FW; k++) begin tdi = 2'b11; @(negedge clk); end
    tdi = 2'b00;
    while (busy != 0) @(negedge clk);
    repeat (2) @(negedge clk);
    capture = 2'b11;
    @(negedge clk); capture = 2'b00;
    @(negedge clk);
    cf = '0; cb = '0;
    for (int k = 0; k < FP; k++) begin
      cf[k] = tdo[1];
      if (k < BP) cb[k] = tdo[0];
      @(negedge clk);
    end
  endtask

  // Independent expectation: repairable when no cluster holds two defects.
  function automatic bit repairable();
    for (int c = 0; c < FC; c++) begin
      int cnt = 0;
      for (int j = 0; j <= csize(FW, FC, c); j++) cnt += int'(open_fwd[cstart(FW, FC, c) + c + j]);
      if (cnt > 1) return 0;
    end
    for (int c = 0; c < BC; c++) begin
      int cnt = 0;
      for (int j = 0; j <= csize(BW, BC, c); j++) cnt += int'(open_bwd[cstart(BW, BC, c) + c + j]);
      if (cnt > 1) return 0;
    end
    return 1;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    for (int trial = 0; trial < NTRIAL; trial++) begin
      logic [FP-1:0] cf0, cf1;
      logic [BP-1:0] cb0, cb1;
      logic [127:0] bad_f, bad_b;
      logic [CFG-1:0] fc, bc;
      int mf, mb, bad;
      bit dis, expect_ok;
      rst_n = 0;
      dut.u_send.u_otp.fuse = '0;
      dut.u_recv.u_otp.fuse = '0;
      open_fwd = '0; open_bwd = '0;
      for (int k = $urandom_range(0, 3); k > 0; k--) begin
        int p;
        p = $urandom_range(0, FP + BP - 1);
        if (p < FP) open_fwd[p] = 1'b1; else open_bwd[p - FP] = 1'b1;
      end
      expect_ok = repairable();
      @(negedge clk); rst_n = 1;
      scan_pass(0, cf0, cb0);
      scan_pass(1, cf1, cb1);
      test_en = '0;
      bad_f = (driven_pads(FW, FC, 0) & ~128'(cf0)) | (driven_pads(FW, FC, 1) & ~128'(cf1));
      bad_b = (driven_pads(BW, BC, 0) & ~128'(cb0)) | (driven_pads(BW, BC, 1) & ~128'(cb1));
      check(bad_f[FP-1:0] == open_fwd && bad_b[BP-1:0] == open_bwd, "diagnosis");
      fc = codes(FW, FC, bad_f, mf);
      bc = codes(BW, BC, bad_b, mb);
      dis = (mf > 1) || (mb > 1);
      check(dis == !expect_ok, "repairability");
      prog_data[0] = CFG'(fc[FC*REP_W-1:0]) | (CFG'(bc[BC*REP_W-1:0]) << (FC*REP_W)) | (CFG'(dis) << (CFG-1));
      prog_data[1] = CFG'(bc[BC*REP_W-1:0]) | (CFG'(fc[FC*REP_W-1:0]) << (BC*REP_W)) | (CFG'(dis) << (CFG-1));
      prog_en = 2'b11; @(negedge clk); prog_en = '0;
      bad = 0;
      for (int t = 0; t < 20; t++) begin
        s_fwd = {$urandom, $urandom}; r_bwd = BW'($urandom);
        #1;
        if (dis) begin
          if (r_fwd[FWD_VALID_BIT] != 1'b0 || s_bwd[BWD_STALL_BIT] != 1'b1) bad++;
        end else if (r_fwd != s_fwd || s_bwd != r_bwd) bad++;
        @(negedge clk);
      end
      check(bad == 0, $sformatf("link behaviour after repair, %0d bad cycles", bad));
      if (!dis) working_o++;
    end
    done_o = 1;
  end

endmodule
