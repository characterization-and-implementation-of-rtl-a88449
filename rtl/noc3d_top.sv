// Two-tier 3-D network-on-chip with fault-tolerant vertical links.
//
// A 3x2 mesh of switches folded onto two stacked tiers: SW0-SW2 (top tier) and
// SW3-SW5 (bottom tier) each form a row of planar links, and the two central
// switches SW1 and SW4 are joined by two unidirectional fault-tolerant TSV
// links (ft_vertical_link), one per direction, which are the only vertical
// connection. Every switch serves one processor and one memory port.
//
// Switch ports: 0 = processor, 1 = memory, 2 = west neighbour (east for SW0
// and SW3), 3 = east neighbour (SW1 and SW4 only), 4 = vertical (SW1 and SW4
// only). Core index k = 0..5 is processor Pk on switch k, k = 6..11 is memory
// M(k-6) on switch k-6. Cores attach directly to the switch ports here; a
// core drives valid/flit and obeys stall, and receives valid/flit and may
// stall the switch.
//
// Vertical link 0 runs SW1 -> SW4 (top to bottom), link 1 runs SW4 -> SW1.
// Each link's forward group is {fwd reset, fwd clock, valid, flit} and its
// backward group {aux[1:0], stall}. One clock drives both tiers in this RTL;
// the forwarded clock and reset are carried across the TSVs and appear on
// vl_fwd_clk_o/vl_fwd_rst_n_o at the receiving tier for a mesochronous
// synchronizer outside this design. The aux wires are carried from the
// receiving switch's tier (vl_aux_i) back to the sender's tier (vl_aux_o).
// In the vl_* test/OTP arrays, [l][0] is link l's sending end and [l][1] its
// receiving end; see ft_link_end for the test and fuse protocol.
//
// Topology, flit width, link signal count and spare count follow the
// paper's case study (32-bit flits, 38 signals and 4 spare TSVs per 3-D
// link); port numbering and the sideband assignment are this design's.
module noc3d_top
  import noc3d_pkg::*;
#(
  parameter int unsigned DEPTH = 4,
  localparam int unsigned NCORE = 12,
  localparam int unsigned CFG_W = END_CFG_W
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  // cores
  input  flit_t [NCORE-1:0]                     core_in_flit,
  input  logic  [NCORE-1:0]                     core_in_valid,
  output logic  [NCORE-1:0]                     core_in_stall,
  output flit_t [NCORE-1:0]                     core_out_flit,
  output logic  [NCORE-1:0]                     core_out_valid,
  input  logic  [NCORE-1:0]                     core_out_stall,
  // vertical links: test access and fuses
  input  logic  [1:0][1:0]                      vl_test_en,
  input  logic  [1:0][1:0]                      vl_test_shift,
  input  logic  [1:0][1:0]                      vl_start,
  input  logic  [1:0][1:0]                      vl_capture,
  input  logic  [1:0][1:0]                      vl_tdi,
  output logic  [1:0][1:0]                      vl_tdo,
  output logic  [1:0][1:0]                      vl_test_busy,
  input  logic  [1:0][1:0]                      vl_otp_prog_en,
  input  logic  [1:0][1:0][CFG_W-1:0]           vl_otp_prog_data,
  output logic  [1:0][1:0]                      vl_link_disabled,
  // vertical links: TSV open-defect injection (via model control)
  input  logic  [1:0][FWD_W+FWD_CLUSTERS-1:0]   vl_open_fwd,
  input  logic  [1:0][BWD_W+BWD_CLUSTERS-1:0]   vl_open_bwd,
  // vertical links: forwarded clock/reset and sideband
  output logic  [1:0]                           vl_fwd_clk_o,
  output logic  [1:0]                           vl_fwd_rst_n_o,
  input  logic  [1:0][BWD_AUX_W-1:0]            vl_aux_i,
  output logic  [1:0][BWD_AUX_W-1:0]            vl_aux_o
);

  localparam int unsigned NSW = 6;
  localparam int unsigned MAXP = 5;

  flit_t [NSW-1:0][MAXP-1:0] sw_in_flit, sw_out_flit;
  logic  [NSW-1:0][MAXP-1:0] sw_in_valid, sw_in_stall, sw_out_valid, sw_out_stall;

  // Switches: the central ones have five ports, the edge ones three.
  for (genvar s = 0; s < NSW; s++) begin : g_sw
    localparam int unsigned NP = (s % 3 == 1) ? 5 : 3;
    stallgo_switch #(.NP(NP), .DEPTH(DEPTH)) u_sw (
      .clk, .rst_n,
      .in_flit   (sw_in_flit[s][NP-1:0]),
      .in_valid  (sw_in_valid[s][NP-1:0]),
      .in_stall  (sw_in_stall[s][NP-1:0]),
      .out_flit  (sw_out_flit[s][NP-1:0]),
      .out_valid (sw_out_valid[s][NP-1:0]),
      .out_stall (sw_out_stall[s][NP-1:0])
    );
    if (NP < MAXP) begin : g_unused
      assign sw_in_stall[s][MAXP-1:NP]  = '0;
      assign sw_out_flit[s][MAXP-1:NP]  = '0;
      assign sw_out_valid[s][MAXP-1:NP] = '0;
    end
  end

  // Point-to-point STALL/GO channel from switch sa port pa to switch sb port pb.
  `define NOC3D_CHAN(sa, pa, sb, pb) \
    assign sw_in_flit[sb][pb]   = sw_out_flit[sa][pa]; \
    assign sw_in_valid[sb][pb]  = sw_out_valid[sa][pa]; \
    assign sw_out_stall[sa][pa] = sw_in_stall[sb][pb];

  // Cores.
  for (genvar s = 0; s < NSW; s++) begin : g_core
    assign sw_in_flit[s][0]       = core_in_flit[s];
    assign sw_in_valid[s][0]      = core_in_valid[s];
    assign core_in_stall[s]       = sw_in_stall[s][0];
    assign core_out_flit[s]       = sw_out_flit[s][0];
    assign core_out_valid[s]      = sw_out_valid[s][0];
    assign sw_out_stall[s][0]     = core_out_stall[s];
    assign sw_in_flit[s][1]       = core_in_flit[s+6];
    assign sw_in_valid[s][1]      = core_in_valid[s+6];
    assign core_in_stall[s+6]     = sw_in_stall[s][1];
    assign core_out_flit[s+6]     = sw_out_flit[s][1];
    assign core_out_valid[s+6]    = sw_out_valid[s][1];
    assign sw_out_stall[s][1]     = core_out_stall[s+6];
  end

  // Planar links of both tiers.
  for (genvar t = 0; t < 2; t++) begin : g_tier
    `NOC3D_CHAN(3*t,   2, 3*t+1, 2)
    `NOC3D_CHAN(3*t+1, 2, 3*t,   2)
    `NOC3D_CHAN(3*t+1, 3, 3*t+2, 2)
    `NOC3D_CHAN(3*t+2, 2, 3*t+1, 3)
  end

  `undef NOC3D_CHAN

  // Unused port inputs of the edge switches.
  for (genvar s = 0; s < NSW; s++) begin : g_tie
    if (s % 3 != 1) begin : g_edge
      assign sw_in_flit[s][4:3]   = '0;
      assign sw_in_valid[s][4:3]  = '0;
      assign sw_out_stall[s][4:3] = '0;
    end
  end

  // Vertical links: l = 0 is SW1 -> SW4, l = 1 is SW4 -> SW1.
  for (genvar l = 0; l < 2; l++) begin : g_vl
    localparam int unsigned SS = (l == 0) ? 1 : 4;   // sending switch
    localparam int unsigned RS = (l == 0) ? 4 : 1;   // receiving switch
    logic [FWD_W-1:0] s_fwd, r_fwd;
    logic [BWD_W-1:0] s_bwd, r_bwd;

    assign s_fwd = {rst_n, clk, sw_out_valid[SS][4], sw_out_flit[SS][4]};
    assign sw_in_flit[RS][4]  = r_fwd[FLIT_W-1:0];
    assign sw_in_valid[RS][4] = r_fwd[FWD_VALID_BIT];
    assign vl_fwd_clk_o[l]    = r_fwd[FWD_CLK_BIT];
    assign vl_fwd_rst_n_o[l]  = r_fwd[FWD_RST_BIT];

    assign r_bwd = {vl_aux_i[l], sw_in_stall[RS][4]};
    assign sw_out_stall[SS][4] = s_bwd[BWD_STALL_BIT];
    assign vl_aux_o[l]         = s_bwd[BWD_W-1:1];

    ft_vertical_link u_link (
      .clk, .rst_n,
      .s_fwd_i         (s_fwd),
      .s_bwd_o         (s_bwd),
      .r_fwd_o         (r_fwd),
      .r_bwd_i         (r_bwd),
      .test_en_i       (vl_test_en[l]),
      .test_shift_i    (vl_test_shift[l]),
      .start_i         (vl_start[l]),
      .capture_i       (vl_capture[l]),
      .tdi_i           (vl_tdi[l]),
      .tdo_o           (vl_tdo[l]),
      .test_busy_o     (vl_test_busy[l]),
      .otp_prog_en_i   (vl_otp_prog_en[l]),
      .otp_prog_data_i (vl_otp_prog_data[l]),
      .link_disabled_o (vl_link_disabled[l]),
      .open_fwd_i      (vl_open_fwd[l]),
      .open_bwd_i      (vl_open_bwd[l])
    );
  end

endmodule
