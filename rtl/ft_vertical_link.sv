// One unidirectional fault-tolerant 3-D link between two tiers.
//
// The sending tier's end (ft_link_end) takes the FWD_W forward signals of a
// switch output port and returns its BWD_W backward signals; the receiving
// tier's end does the opposite for the neighbouring switch's input port. Two
// TSV bundles carry FWD_W+FWD_CLUSTERS forward pads and BWD_W+BWD_CLUSTERS
// backward pads. With the defaults this is the 32-bit link of 38 signals
// (35 forward: flit, valid, forwarded clock and reset; 3 backward: stall and
// two sideband wires) with 4 spare TSVs, 3 forward and 1 backward: 42 TSVs.
//
// The path is combinational end to end: a forward signal crosses one 2:1 mux
// on each tier plus the via, and stall returns the same way, as in a STALL/GO
// link whose critical path spans the link. When a link end is in test mode or
// its disable fuse is blown, the receiver sees valid = 0 and the sender sees
// stall = 1 (the clamp values are this design's choice of "safe value").
//
// Index 0 of the test and OTP arrays is the sending end, index 1 the receiving
// end. open_fwd_i/open_bwd_i inject TSV open defects into the via model.
module ft_vertical_link
  import noc3d_pkg::*;
#(
  parameter int unsigned FWD_N = FWD_W,
  parameter int unsigned FWD_C = FWD_CLUSTERS,
  parameter int unsigned BWD_N = BWD_W,
  parameter int unsigned BWD_C = BWD_CLUSTERS,
  parameter int unsigned VALID_BIT = FWD_VALID_BIT,
  parameter int unsigned STALL_BIT = BWD_STALL_BIT,
  localparam int unsigned CFG_W = (FWD_C + BWD_C) * REP_W + 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // sending switch
  input  logic [FWD_N-1:0]         s_fwd_i,
  output logic [BWD_N-1:0]         s_bwd_o,
  // receiving switch
  output logic [FWD_N-1:0]         r_fwd_o,
  input  logic [BWD_N-1:0]         r_bwd_i,
  // test access, [0] sending end, [1] receiving end
  input  logic [1:0]               test_en_i,
  input  logic [1:0]               test_shift_i,
  input  logic [1:0]               start_i,
  input  logic [1:0]               capture_i,
  input  logic [1:0]               tdi_i,
  output logic [1:0]               tdo_o,
  output logic [1:0]               test_busy_o,
  input  logic [1:0]               otp_prog_en_i,
  input  logic [1:0][CFG_W-1:0]    otp_prog_data_i,
  output logic [1:0]               link_disabled_o,
  // TSV defect injection (model control)
  input  logic [FWD_N+FWD_C-1:0]   open_fwd_i,
  input  logic [BWD_N+BWD_C-1:0]   open_bwd_i
);

  logic [FWD_N+FWD_C-1:0] fwd_pad_top, fwd_pad_bot;
  logic [BWD_N+BWD_C-1:0] bwd_pad_top, bwd_pad_bot;

  ft_link_end #(
    .OUT_W(FWD_N), .OUT_C(FWD_C), .IN_W(BWD_N), .IN_C(BWD_C),
    .IN_CLAMP_MASK(BWD_N'(1) << STALL_BIT), .IN_CLAMP_VAL(BWD_N'(1) << STALL_BIT)
  ) u_send (
    .clk, .rst_n,
    .out_sig_i       (s_fwd_i),
    .in_sig_o        (s_bwd_o),
    .out_pad_o       (fwd_pad_top),
    .in_pad_i        (bwd_pad_bot),
    .test_en_i       (test_en_i[0]),
    .test_shift_i    (test_shift_i[0]),
    .start_i         (start_i[0]),
    .capture_i       (capture_i[0]),
    .tdi_i           (tdi_i[0]),
    .tdo_o           (tdo_o[0]),
    .test_busy_o     (test_busy_o[0]),
    .otp_prog_en_i   (otp_prog_en_i[0]),
    .otp_prog_data_i (otp_prog_data_i[0]),
    .link_disabled_o (link_disabled_o[0])
  );

  tsv_bundle #(.N(FWD_N + FWD_C)) u_tsv_fwd (
    .top_i  (fwd_pad_top),
    .open_i (open_fwd_i),
    .bot_o  (fwd_pad_bot)
  );

  tsv_bundle #(.N(BWD_N + BWD_C)) u_tsv_bwd (
    .top_i  (bwd_pad_top),
    .open_i (open_bwd_i),
    .bot_o  (bwd_pad_bot)
  );

  ft_link_end #(
    .OUT_W(BWD_N), .OUT_C(BWD_C), .IN_W(FWD_N), .IN_C(FWD_C),
    .IN_CLAMP_MASK(FWD_N'(1) << VALID_BIT), .IN_CLAMP_VAL('0)
  ) u_recv (
    .clk, .rst_n,
    .out_sig_i       (r_bwd_i),
    .in_sig_o        (r_fwd_o),
    .out_pad_o       (bwd_pad_top),
    .in_pad_i        (fwd_pad_bot),
    .test_en_i       (test_en_i[1]),
    .test_shift_i    (test_shift_i[1]),
    .start_i         (start_i[1]),
    .capture_i       (capture_i[1]),
    .tdi_i           (tdi_i[1]),
    .tdo_o           (tdo_o[1]),
    .test_busy_o     (test_busy_o[1]),
    .otp_prog_en_i   (otp_prog_en_i[1]),
    .otp_prog_data_i (otp_prog_data_i[1]),
    .link_disabled_o (link_disabled_o[1])
  );

endmodule
