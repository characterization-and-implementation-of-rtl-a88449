// One tier's end of a fault-tolerant vertical link (the "X + ROM" block that
// sits between a switch port and its TSV pads).
//
// Normal mode: the OUT_W outgoing signals go through tsv_tx_xbar onto
// OUT_W+OUT_C pads, and the IN_W+IN_C incoming pads come back through
// tsv_rx_xbar. Both crossbars take their per-cluster repair codes from the OTP
// fuse word, so a faulty TSV in each cluster is bypassed by shifting onto the
// cluster's spare. If the OTP's disable fuse is blown (more than one fault in
// some cluster), the incoming flow-control bits named by IN_CLAMP_MASK are
// clamped to IN_CLAMP_VAL so no traffic crosses the link; the routes of the
// network must then avoid it.
//
// Test mode (test_en_i high): an inject scan chain of OUT_W bits, loaded
// serially from tdi_i, drives the outgoing crossbar instead of the switch;
// a capture scan chain of IN_W+IN_C bits samples the raw incoming pads (before
// the receive muxes, so every TSV, spares included, is seen individually) and
// shifts them out on tdo_o, bit 0 first. The crossbars ignore the OTP and use
// test_shift_i: 0 drives every regular pad, 1 shifts every cluster so the
// spares are driven too; two passes therefore cover all TSVs. Flow control is
// clamped as for a disabled link. tsv_test_ctrl sequences the chains.
//
// OTP word layout: [OUT_C*REP_W-1:0] outgoing cluster codes (cluster 0 in the
// low bits), then IN_C incoming codes, then the disable fuse in the MSB.
//
// From the paper: 2x1 crossbars on both sides, ROM-held configuration
// computed off-chip, scan-based test injecting on one tier and capturing on
// the other with flow control disabled, link disabling by clamping flow
// control. This design's choices: the dedicated scan chains at the link
// boundary (the paper scans through the switch input buffers), the
// two-pass test setting, the word layout, and the clamp values.
module ft_link_end
  import noc3d_pkg::*;
#(
  parameter int unsigned OUT_W = FWD_W,
  parameter int unsigned OUT_C = FWD_CLUSTERS,
  parameter int unsigned IN_W  = BWD_W,
  parameter int unsigned IN_C  = BWD_CLUSTERS,
  parameter logic [IN_W-1:0] IN_CLAMP_MASK = IN_W'(1),
  parameter logic [IN_W-1:0] IN_CLAMP_VAL  = IN_W'(1),
  localparam int unsigned CFG_W = (OUT_C + IN_C) * REP_W + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // switch side
  input  logic [OUT_W-1:0]      out_sig_i,
  output logic [IN_W-1:0]       in_sig_o,
  // TSV side
  output logic [OUT_W+OUT_C-1:0] out_pad_o,
  input  logic [IN_W+IN_C-1:0]   in_pad_i,
  // test access
  input  logic                  test_en_i,
  input  logic                  test_shift_i,
  input  logic                  start_i,
  input  logic                  capture_i,
  input  logic                  tdi_i,
  output logic                  tdo_o,
  output logic                  test_busy_o,
  // OTP programming
  input  logic                  otp_prog_en_i,
  input  logic [CFG_W-1:0]      otp_prog_data_i,
  output logic                  link_disabled_o
);

  localparam int unsigned IN_P = IN_W + IN_C;

  logic [CFG_W-1:0]               cfg;
  logic [OUT_C-1:0][REP_W-1:0]    out_codes;
  logic [IN_C-1:0][REP_W-1:0]     in_codes;
  logic [OUT_W-1:0]               inj_q;
  logic [IN_P-1:0]                cap_q;
  logic [OUT_W-1:0]               tx_sig;
  logic [IN_W-1:0]                rx_sig;
  logic                           inj_shift, cap_load, cap_shift;
  logic                           clamp;

  otp_rom #(.BITS(CFG_W)) u_otp (
    .clk       (clk),
    .prog_en   (otp_prog_en_i),
    .prog_data (otp_prog_data_i),
    .q         (cfg)
  );

  tsv_test_ctrl #(.INJ_LEN(OUT_W), .CAP_LEN(IN_P)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .test_en_i   (test_en_i),
    .start_i     (start_i),
    .capture_i   (capture_i),
    .inj_shift_o (inj_shift),
    .cap_load_o  (cap_load),
    .cap_shift_o (cap_shift),
    .busy_o      (test_busy_o)
  );

  // Crossbar settings: fuses in normal mode, uniform test setting in test mode.
  always_comb begin
    for (int unsigned c = 0; c < OUT_C; c++)
      out_codes[c] = test_en_i ? REP_W'(test_shift_i) : cfg[c*REP_W +: REP_W];
    for (int unsigned c = 0; c < IN_C; c++)
      in_codes[c] = test_en_i ? REP_W'(test_shift_i) : cfg[(OUT_C + c)*REP_W +: REP_W];
  end

  assign link_disabled_o = cfg[CFG_W-1];

  // Inject and capture scan chains.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inj_q <= '0;
      cap_q <= '0;
    end else begin
      if (inj_shift)
        inj_q <= {tdi_i, inj_q[OUT_W-1:1]};
      if (cap_load)
        cap_q <= in_pad_i;
      else if (cap_shift)
        cap_q <= {1'b0, cap_q[IN_P-1:1]};
    end
  end

  assign tdo_o  = cap_q[0];
  assign tx_sig = test_en_i ? inj_q : out_sig_i;

  tsv_tx_xbar #(.W(OUT_W), .C(OUT_C)) u_tx (
    .sig_i (tx_sig),
    .cfg_i (out_codes),
    .pad_o (out_pad_o)
  );

  tsv_rx_xbar #(.W(IN_W), .C(IN_C)) u_rx (
    .pad_i (in_pad_i),
    .cfg_i (in_codes),
    .sig_o (rx_sig)
  );

  assign clamp    = test_en_i || link_disabled_o;
  assign in_sig_o = clamp ? ((rx_sig & ~IN_CLAMP_MASK) | (IN_CLAMP_VAL & IN_CLAMP_MASK)) : rx_sig;

endmodule
