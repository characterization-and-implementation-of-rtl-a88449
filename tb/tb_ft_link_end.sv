// Self-checking test of one link end (sending side: 35 outgoing signals in 3
// clusters, 3 incoming in 1 cluster, stall = incoming bit 0).
//
// Checks: blank fuses pass signals straight (pads = signals, spares low);
// blown repair codes shift the outgoing pads and select the incoming pads as
// the cluster rule says; in test mode the inject chain, loaded serially,
// drives the pads instead of the switch, the capture chain returns the raw
// incoming pads bit 0 first, and stall is clamped high; the disable fuse
// clamps stall high in normal mode.
module tb_ft_link_end;
  import noc3d_pkg::*;

  localparam int OW = 35, OC = 3, IW = 3, IC = 1, CFG = END_CFG_W;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [OW-1:0] out_sig = '0;
  logic [IW-1:0] in_sig;
  logic [OW+OC-1:0] out_pad;
  logic [IW+IC-1:0] in_pad = '0;
  logic test_en = 0, test_shift = 0, start = 0, capture = 0, tdi = 0, tdo, busy;
  logic prog_en = 0, disabled;
  logic [CFG-1:0] prog_data = '0;

  ft_link_end #(.OUT_W(OW), .OUT_C(OC), .IN_W(IW), .IN_C(IC),
                .IN_CLAMP_MASK(3'b001), .IN_CLAMP_VAL(3'b001)) dut (
    .clk, .rst_n, .out_sig_i(out_sig), .in_sig_o(in_sig), .out_pad_o(out_pad), .in_pad_i(in_pad),
    .test_en_i(test_en), .test_shift_i(test_shift), .start_i(start), .capture_i(capture),
    .tdi_i(tdi), .tdo_o(tdo), .test_busy_o(busy), .otp_prog_en_i(prog_en),
    .otp_prog_data_i(prog_data), .link_disabled_o(disabled));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  // Straight mapping: signal i of cluster c (sizes 11, 12, 12) on pad i + c.
  function automatic logic [OW+OC-1:0] straight(logic [OW-1:0] s);
    logic [OW+OC-1:0] p;
    p = '0;
    for (int i = 0; i < OW; i++) p[i + (i >= 11) + (i >= 23)] = s[i];
    return p;
  endfunction

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [OW-1:0] v;
    logic [IW+IC-1:0] rawin;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Blank fuses: straight through.
    for (int t = 0; t < 50; t++) begin
      out_sig = {$urandom, $urandom}; in_pad = 4'($urandom);
      #1;
      check(out_pad == straight(out_sig), "blank: straight outgoing pads");
      check(in_sig == in_pad[2:0], "blank: incoming pads 0..2");
      @(negedge clk);
    end
    // Repair: outgoing cluster 1 pad 4 faulty (code 5), incoming pad 0 faulty (code 1).
    prog_data = '0;
    prog_data[1*REP_W +: REP_W] = REP_W'(5);
    prog_data[3*REP_W +: REP_W] = REP_W'(1);
    prog_en = 1; @(negedge clk); prog_en = 0;
    for (int t = 0; t < 50; t++) begin
      out_sig = {$urandom, $urandom}; in_pad = 4'($urandom);
      #1;
      // cluster 1 starts at signal 11, pads from 12; its local signals 4..11 move up
      check(out_pad[12 +: 4] == out_sig[11 +: 4], "repair: pads below the fault unchanged");
      check(out_pad[17 +: 8] == out_sig[15 +: 8], "repair: shifted signals");
      check(out_pad[0 +: 11] == out_sig[0 +: 11] && out_pad[25 +: 12] == out_sig[23 +: 12],
            "repair: other clusters untouched");
      check(in_sig == in_pad[3:1], "repair: incoming shifted past pad 0");
      @(negedge clk);
    end
    // Test mode: shift in a vector, pads show it, stall clamped.
    v = {$urandom, $urandom};
    test_en = 1; test_shift = 0;
    start = 1; @(negedge clk); start = 0;
    for (int k = 0; k < OW; k++) begin tdi = v[k]; @(negedge clk); end
    while (busy) @(negedge clk);
    out_sig = ~v;
    #1;
    check(out_pad == straight(v), "test: inject chain drives pads");
    check(in_sig[0] == 1'b1, "test: stall clamped");
    rawin = 4'b1011;
    in_pad = rawin;
    capture = 1; @(negedge clk); capture = 0;
    @(negedge clk);
    for (int k = 0; k < IW + IC; k++) begin
      check(tdo == rawin[k], $sformatf("test: captured pad %0d", k));
      @(negedge clk);
    end
    test_en = 0;
    // Disable fuse: stall clamped in normal mode.
    prog_data = '0; prog_data[CFG-1] = 1'b1;
    prog_en = 1; @(negedge clk); prog_en = 0;
    for (int t = 0; t < 50; t++) begin
      out_sig = {$urandom, $urandom}; in_pad = 4'($urandom);
      #1;
      check(disabled && in_sig[0] == 1'b1, "disabled: stall clamped high");
      check(in_sig[2:1] == in_pad[3:2], "disabled: other incoming bits keep their repair");
      check(out_pad[17 +: 8] == out_sig[15 +: 8], "disabled: outgoing repair kept");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
