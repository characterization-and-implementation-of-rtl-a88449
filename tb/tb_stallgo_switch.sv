// Self-checking test of stallgo_switch (5 ports, depth 4).
//
// Five sources send random packets (0..15 payload flits) to random outputs
// with random idle cycles, and five sinks apply random stall. Every header
// carries its source and a sequence number in the route bits above the first
// hop, so a sink can tell which packet arrives; the scoreboard checks that each
// packet arrives at the output it named, whole and uninterrupted (wormhole),
// with the route shifted by one hop and payload in order, and that every
// packet arrives. A first directed test checks the single-cycle latency: a
// flit accepted at one clock edge is offered downstream before the next.
module tb_stallgo_switch;
  import noc3d_pkg::*;

  localparam int NP = 5;
  localparam int NPKT = 60;   // packets per source

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  flit_t [NP-1:0] in_flit = '0, out_flit;
  logic  [NP-1:0] in_valid = '0, in_stall, out_valid, out_stall = '0;

  stallgo_switch #(.NP(NP), .DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  typedef struct { int src; int seq; int dst; int len; flit_t f[16]; } pkt_t;
  pkt_t exp_q [NP][NP][$];   // [dst][src]
  int   received = 0, sent_stalls = 0, sink_stalls = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Send one flit with STALL/GO: hold valid until a clock edge without stall.
  // Called 1 ns after a rising edge; flow control is sampled 1 ns before
  // the next one.
  task automatic send_flit(int p, flit_t f);
    in_flit[p] = f; in_valid[p] = 1'b1;
    forever begin
      @(negedge clk); #4;
      if (!in_stall[p]) begin @(posedge clk); #1; break; end
      sent_stalls++;
    end
    in_valid[p] = 1'b0;
  endtask

  task automatic source(int p);
    for (int n = 0; n < NPKT; n++) begin
      pkt_t k;
      logic [ROUTE_W-1:0] route;
      k.src = p; k.seq = n; k.dst = $urandom_range(0, NP - 1); k.len = $urandom_range(0, 15);
      route = ROUTE_W'({8'(n), 3'(p), 3'($urandom_range(0, 4)), 3'(k.dst)});
      k.f[0] = make_header(LEN_W'(k.len), route);
      for (int j = 1; j <= k.len; j++) k.f[j] = {8'(p), 8'(n), 16'($urandom)};
      exp_q[k.dst][p].push_back(k);
      for (int j = 0; j <= k.len; j++) begin
        send_flit(p, k.f[j]);
        if ($urandom_range(0, 3) == 0) begin
          repeat ($urandom_range(1, 3)) @(posedge clk);
          #1;
        end
      end
    end
  endtask

  // Sink: random stall; reassemble packets and check.
  task automatic sink(int o);
    int  in_pkt = 0, src = 0, idx = 0;
    pkt_t k;
    forever begin
      @(negedge clk);
      out_stall[o] = ($urandom_range(0, 3) == 0);
      #4;
      if (out_valid[o] && out_stall[o]) sink_stalls++;
      if (out_valid[o] && !out_stall[o]) begin
        flit_t f;
        f = out_flit[o];
        if (!in_pkt) begin
          src = int'(f[5:3]);
          check(src < NP && exp_q[o][src].size() > 0, $sformatf("unexpected header %h at %0d", f, o));
          if (src < NP && exp_q[o][src].size() > 0) begin
            k = exp_q[o][src].pop_front();
            check(f == make_header(k.f[0][31:28], ROUTE_W'(k.f[0][ROUTE_W-1:0] >> HOP_W)),
                  $sformatf("header %h from %0d at %0d", f, src, o));
            idx = 1;
            in_pkt = (k.len != 0);
            if (k.len == 0) received++;
          end
        end else begin
          check(f == k.f[idx], $sformatf("payload %h exp %h at %0d", f, k.f[idx], o));
          idx++;
          if (idx > k.len) begin in_pkt = 0; received++; end
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // Latency: one header-only packet from port 2 to port 3.
    @(negedge clk);
    in_flit[2] = make_header('0, ROUTE_W'(3)); in_valid[2] = 1;
    @(posedge clk); #1 in_valid[2] = 0;
    check(out_valid[3] && out_flit[3] == make_header('0, '0), "one-cycle switch latency");
    @(posedge clk); #1;
    check(!out_valid[3], "flit left after one cycle");
    // Random traffic.
    for (int o = 0; o < NP; o++) fork automatic int oo = o; sink(oo); join_none
    @(posedge clk); #1;
    fork
      source(0); source(1); source(2); source(3); source(4);
    join
    repeat (200) @(posedge clk);
    check(received == NP * NPKT, $sformatf("received %0d of %0d packets", received, NP * NPKT));
    check(sent_stalls > 0, "input stall happened");
    check(sink_stalls > 0, "output stall happened");
    $display("stalls at inputs %0d, at outputs %0d", sent_stalls, sink_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
