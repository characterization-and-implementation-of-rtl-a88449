// Shared constants and helpers of the two-tier NoC with fault-tolerant TSV links.
//
// Flit format: a 32-bit flit. A packet is a header flit followed by LEN payload
// flits. Header layout (this design's choice; the source-routing header format
// of the switch library is not specified): [31:28] payload length, [27:0] route,
// consumed 3 bits per switch from the least significant end.
//
// Vertical link signal groups follow the 38-signal, 32-bit 3-D link: 35 signals
// travel forward (flit, valid, forwarded clock and reset) and 3 backward (stall
// and two sideband wires). Four spare TSVs per link: three for the forward
// group, one for the backward group.
package noc3d_pkg;

  localparam int unsigned FLIT_W  = 32;
  localparam int unsigned LEN_W   = 4;
  localparam int unsigned ROUTE_W = 28;
  localparam int unsigned HOP_W   = 3;

  typedef logic [FLIT_W-1:0] flit_t;

  // Forward group bit positions.
  localparam int unsigned FWD_W         = 35;
  localparam int unsigned FWD_VALID_BIT = 32;
  localparam int unsigned FWD_CLK_BIT   = 33;
  localparam int unsigned FWD_RST_BIT   = 34;
  // Backward group bit positions.
  localparam int unsigned BWD_W         = 3;
  localparam int unsigned BWD_STALL_BIT = 0;
  localparam int unsigned BWD_AUX_W     = 2;

  // Spare TSVs (one per cluster) of each group.
  localparam int unsigned FWD_CLUSTERS = 3;
  localparam int unsigned BWD_CLUSTERS = 1;

  // Width of one cluster's repair code: 0 = no repair, k = pad k-1 of the
  // cluster is faulty. Wide enough for clusters of up to 63 signals, so a
  // whole 35-signal forward group can share one spare.
  localparam int unsigned REP_W = 6;

  // Configuration word of one link end: {disable, in-group codes, out-group codes}.
  localparam int unsigned END_CFG_W = (FWD_CLUSTERS + BWD_CLUSTERS) * REP_W + 1;

  // First signal of cluster c when W signals are split into C clusters.
  function automatic int unsigned cl_start(int unsigned w, int unsigned c_cnt, int unsigned c);
    return (c * w) / c_cnt;
  endfunction

  // Number of signals in cluster c.
  function automatic int unsigned cl_size(int unsigned w, int unsigned c_cnt, int unsigned c);
    return cl_start(w, c_cnt, c + 1) - cl_start(w, c_cnt, c);
  endfunction

  // Build a header flit.
  function automatic flit_t make_header(logic [LEN_W-1:0] len, logic [ROUTE_W-1:0] route);
    return {len, route};
  endfunction

endpackage
