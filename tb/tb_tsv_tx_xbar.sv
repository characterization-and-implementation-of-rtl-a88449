// Self-checking test of tsv_tx_xbar at the 35-signal, 3-cluster forward-group
// size and of the three-signal example cluster (one spare, pad 2 faulty).
// The expected pad map is built from the rule "signals before the faulty pad
// keep their pad, the faulty one and all after it move up by one, the spare
// idles low without a repair".
module tb_tsv_tx_xbar;
  import noc3d_pkg::*;

  int checks = 0, failures = 0;

  localparam int unsigned W = FWD_W, C = FWD_CLUSTERS;
  logic [W-1:0]            sig;
  logic [C-1:0][REP_W-1:0] cfg;
  logic [W+C-1:0]          pad;

  tsv_tx_xbar #(.W(W), .C(C)) dut (.sig_i(sig), .cfg_i(cfg), .pad_o(pad));

  // Example: cluster of 3 signals, pad 2 (1-based) faulty.
  logic [2:0]            s3;
  logic [0:0][REP_W-1:0] c3;
  logic [3:0]            p3;
  tsv_tx_xbar #(.W(3), .C(1)) dut3 (.sig_i(s3), .cfg_i(c3), .pad_o(p3));

  function automatic logic [W+C-1:0] expect_pads(logic [W-1:0] s, logic [C-1:0][REP_W-1:0] k);
    logic [W+C-1:0] e;
    int base, sz, f;
    e = '0;
    base = 0;
    for (int c = 0; c < C; c++) begin
      sz = (c == 0) ? 11 : 12;           // 35 signals in 3 clusters: 11, 12, 12
      for (int i = 0; i < sz; i++) e[base + c + i] = s[base + i];
      if (k[c] != 0) begin
        f = int'(k[c]) - 1;
        for (int i = f; i < sz; i++) e[base + c + i + 1] = s[base + i];
      end
      base += sz;
    end
    return e;
  endfunction

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked example: with pad 2 faulty, signal 1 -> pad 1, signal 2 -> pad 3,
    // signal 3 -> spare E1.
    s3 = 3'b101; c3[0] = REP_W'(2);
    #1;
    checks++;
    if (p3[0] !== 1'b1 || p3[2] !== 1'b0 || p3[3] !== 1'b1) begin
      failures++; $display("FAIL example pads=%b", p3);
    end
    s3 = 3'b010; #1;
    checks++;
    if (p3[0] !== 1'b0 || p3[2] !== 1'b1 || p3[3] !== 1'b0) begin
      failures++; $display("FAIL example pads=%b", p3);
    end
    // No repair: spare idles low.
    s3 = 3'b111; c3[0] = '0; #1;
    checks++;
    if (p3 !== 4'b0111) begin failures++; $display("FAIL no-repair pads=%b", p3); end

    for (int t = 0; t < 2000; t++) begin
      sig = {$urandom, $urandom};
      for (int c = 0; c < C; c++) cfg[c] = REP_W'($urandom_range(0, (c == 0) ? 11 : 12));
      #1;
      checks++;
      if (pad !== expect_pads(sig, cfg)) begin
        failures++;
        if (failures < 10) $display("FAIL sig=%h cfg=%h pad=%h exp=%h", sig, cfg, pad, expect_pads(sig, cfg));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
