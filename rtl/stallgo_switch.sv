// NP x NP wormhole switch with STALL/GO flow control and source routing.
//
// Only the inputs are buffered (one flit_fifo per port), so a flit leaves the
// switch in the cycle after it was written into the input buffer and the
// output path (arbiter, crossbar, link, downstream stall) is combinational, as
// in the single-stage STALL/GO switches the link is built for.
//
// Packets: a header flit {len[3:0], route[27:0]} followed by len payload flits.
// The low 3 bits of route name the output port of this switch; the header
// leaves with route shifted right by 3 so the next switch finds its own port
// there. A header at the head of an input buffer requests its output; each
// free output grants one request round-robin (rr_arbiter). If len is not zero
// the output stays locked to that input until the last payload flit has left
// (wormhole switching).
//
// STALL/GO: a sender presents valid with a flit; the flit moves in every cycle
// in which valid is high and stall is low. in_stall is the input buffer's full
// flag. out_valid never depends on out_stall.
//
// The paper takes the switch from an existing NoC library and gives its
// flow control, buffering and source routing only by function; the header
// format, buffer depth and arbitration policy are this design's.
module stallgo_switch
  import noc3d_pkg::*;
#(
  parameter int unsigned NP    = 5,
  parameter int unsigned DEPTH = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  flit_t [NP-1:0]        in_flit,
  input  logic  [NP-1:0]        in_valid,
  output logic  [NP-1:0]        in_stall,
  output flit_t [NP-1:0]        out_flit,
  output logic  [NP-1:0]        out_valid,
  input  logic  [NP-1:0]        out_stall
);

  localparam int unsigned PW = (NP > 1) ? $clog2(NP) : 1;

  flit_t [NP-1:0]            head;
  logic  [NP-1:0]            full, empty, push, pop;
  logic  [NP-1:0]            in_busy_q;
  logic  [NP-1:0][LEN_W-1:0] in_rem_q;
  logic  [NP-1:0]            out_lock_q;
  logic  [NP-1:0][PW-1:0]    out_owner_q;

  logic  [NP-1:0][NP-1:0]    req;      // [output][input]
  logic  [NP-1:0][NP-1:0]    grant;    // [output][input]
  logic  [NP-1:0][PW-1:0]    sel;
  logic  [NP-1:0]            fire;

  for (genvar i = 0; i < NP; i++) begin : g_in
    assign push[i]     = in_valid[i] && !full[i];
    assign in_stall[i] = full[i];
    flit_fifo #(.W(FLIT_W), .DEPTH(DEPTH)) u_buf (
      .clk, .rst_n,
      .push  (push[i]),
      .din   (in_flit[i]),
      .pop   (pop[i]),
      .dout  (head[i]),
      .full  (full[i]),
      .empty (empty[i])
    );
  end

  // Header requests.
  always_comb begin
    req = '0;
    for (int unsigned i = 0; i < NP; i++)
      if (!empty[i] && !in_busy_q[i])
        for (int unsigned o = 0; o < NP; o++)
          if (head[i][HOP_W-1:0] == HOP_W'(o)) req[o][i] = 1'b1;
  end

  for (genvar o = 0; o < NP; o++) begin : g_arb
    rr_arbiter #(.N(NP)) u_arb (
      .clk, .rst_n,
      .req    (out_lock_q[o] ? '0 : req[o]),
      .update (fire[o]),
      .grant  (grant[o])
    );
  end

  // Crossbar and output valid.
  always_comb begin
    for (int unsigned o = 0; o < NP; o++) begin
      sel[o]       = out_owner_q[o];
      out_valid[o] = 1'b0;
      out_flit[o]  = '0;
      if (out_lock_q[o]) begin
        out_valid[o] = !empty[out_owner_q[o]];
        out_flit[o]  = head[out_owner_q[o]];
      end else begin
        for (int unsigned i = 0; i < NP; i++)
          if (grant[o][i]) sel[o] = PW'(i);
        out_valid[o] = (grant[o] != '0);
        out_flit[o]  = make_header(head[sel[o]][FLIT_W-1 -: LEN_W],
                                   ROUTE_W'(head[sel[o]][ROUTE_W-1:0] >> HOP_W));
      end
      fire[o] = out_valid[o] && !out_stall[o];
    end
    pop = '0;
    for (int unsigned o = 0; o < NP; o++)
      if (fire[o]) pop[sel[o]] = 1'b1;
  end

  // Wormhole state.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_busy_q   <= '0;
      in_rem_q    <= '0;
      out_lock_q  <= '0;
      out_owner_q <= '0;
    end else begin
      for (int unsigned o = 0; o < NP; o++) begin
        if (fire[o]) begin
          if (!out_lock_q[o]) begin
            // header left: lock the output if payload follows
            if (head[sel[o]][FLIT_W-1 -: LEN_W] != '0) begin
              out_lock_q[o]       <= 1'b1;
              out_owner_q[o]      <= sel[o];
              in_busy_q[sel[o]]   <= 1'b1;
              in_rem_q[sel[o]]    <= head[sel[o]][FLIT_W-1 -: LEN_W];
            end
          end else begin
            in_rem_q[sel[o]] <= in_rem_q[sel[o]] - 1'b1;
            if (in_rem_q[sel[o]] == LEN_W'(1)) begin
              out_lock_q[o]     <= 1'b0;
              in_busy_q[sel[o]] <= 1'b0;
            end
          end
        end
      end
    end
  end

  // An input is read by at most one output in a cycle.
  for (genvar i = 0; i < NP; i++) begin : g_chk
    a_dest_exists: assert property (@(posedge clk) disable iff (!rst_n)
      (!empty[i] && !in_busy_q[i]) |-> (head[i][HOP_W-1:0] < HOP_W'(NP)));
  end

endmodule
