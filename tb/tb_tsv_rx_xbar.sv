// Self-checking test of tsv_rx_xbar: (1) against the rule "signal i of a
// cluster reads pad i, or pad i+1 once i has reached the faulty pad", and (2)
// in a loop with tsv_tx_xbar where the faulty pad of every cluster carries
// random garbage: the received signals must equal the sent ones.
module tb_tsv_rx_xbar;
  import noc3d_pkg::*;

  int checks = 0, failures = 0;

  localparam int unsigned W = FWD_W, C = FWD_CLUSTERS;
  logic [W-1:0]            sig, rsig, rsig2;
  logic [C-1:0][REP_W-1:0] cfg;
  logic [W+C-1:0]          pad, bad_pad, rnd_pad, garbage;

  tsv_tx_xbar #(.W(W), .C(C)) u_tx (.sig_i(sig), .cfg_i(cfg), .pad_o(pad));
  assign bad_pad = pad ^ garbage;
  tsv_rx_xbar #(.W(W), .C(C)) dut  (.pad_i(bad_pad), .cfg_i(cfg), .sig_o(rsig));
  tsv_rx_xbar #(.W(W), .C(C)) dut2 (.pad_i(rnd_pad), .cfg_i(cfg), .sig_o(rsig2));

  function automatic logic [W-1:0] expect_sig(logic [W+C-1:0] p, logic [C-1:0][REP_W-1:0] k);
    logic [W-1:0] e;
    int base, sz;
    base = 0;
    for (int c = 0; c < C; c++) begin
      sz = (c == 0) ? 11 : 12;
      for (int i = 0; i < sz; i++)
        e[base + i] = (k[c] != 0 && i + 1 >= int'(k[c])) ? p[base + c + i + 1] : p[base + c + i];
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
    for (int t = 0; t < 2000; t++) begin
      int base;
      sig = {$urandom, $urandom};
      rnd_pad = {$urandom, $urandom};
      garbage = '0;
      base = 0;
      for (int c = 0; c < C; c++) begin
        int sz;
        sz = (c == 0) ? 11 : 12;
        cfg[c] = REP_W'($urandom_range(0, sz));
        if (cfg[c] != 0) garbage[base + c + int'(cfg[c]) - 1] = 1'($urandom);
        base += sz;
      end
      #1;
      checks++;
      if (rsig !== sig) begin
        failures++;
        if (failures < 10) $display("FAIL loop sig=%h cfg=%h got=%h", sig, cfg, rsig);
      end
      checks++;
      if (rsig2 !== expect_sig(rnd_pad, cfg)) begin
        failures++;
        if (failures < 10) $display("FAIL map pad=%h cfg=%h got=%h", rnd_pad, cfg, rsig2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
