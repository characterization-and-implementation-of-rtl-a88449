// Round-robin arbiter for one switch output.
//
// grant is one-hot among the asserted req bits (or zero when none is
// asserted); the search starts just after the requester granted last. The
// pointer moves only when update is high, i.e. when the grant was used.
// Combinational grant, registered pointer. The paper names the switch
// arbiter only; round robin is this design's choice.
module rr_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         update,
  output logic [N-1:0] grant
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last_q;

  always_comb begin
    grant = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      logic [IW-1:0] idx;
      idx = IW'((32'(last_q) + k) % N);
      if (grant == '0 && req[idx]) grant[idx] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_q <= IW'(N - 1);
    else if (update && grant != '0) begin
      for (int unsigned i = 0; i < N; i++)
        if (grant[i]) last_q <= IW'(i);
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));

endmodule
