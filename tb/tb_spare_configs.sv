// Runs the repair flow on the vertical link in the spare-TSV configurations
// of the yield study: 2, 3, 4, 7, 11 and 38 extra pads on a 38-signal 32-bit
// link (35 forward + 3 backward signals). Spares are split between the
// outgoing and incoming groups as 1+1, 2+1, 3+1, 6+1, 10+1 and 35+3 (the
// last gives every TSV its own backup). Each configuration sees the same kind
// of random defects (0 to 3 opens per link) and must repair exactly the links
// with at most one defect per cluster. The fraction of working links is
// printed per configuration; it is not a yield figure (the defect rate here is
// far above a real process) but shows the trend that more spares repair more.
module tb_spare_configs;
  localparam int NCFG = 6;
  localparam int NT = 40;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [NCFG-1:0] done;
  int chk [NCFG], fail [NCFG], work [NCFG];

  ft_link_trial #(.FC(1),  .BC(1), .NTRIAL(NT)) u2  (.clk, .done_o(done[0]), .checks_o(chk[0]), .failures_o(fail[0]), .working_o(work[0]));
  ft_link_trial #(.FC(2),  .BC(1), .NTRIAL(NT)) u3  (.clk, .done_o(done[1]), .checks_o(chk[1]), .failures_o(fail[1]), .working_o(work[1]));
  ft_link_trial #(.FC(3),  .BC(1), .NTRIAL(NT)) u4  (.clk, .done_o(done[2]), .checks_o(chk[2]), .failures_o(fail[2]), .working_o(work[2]));
  ft_link_trial #(.FC(6),  .BC(1), .NTRIAL(NT)) u7  (.clk, .done_o(done[3]), .checks_o(chk[3]), .failures_o(fail[3]), .working_o(work[3]));
  ft_link_trial #(.FC(10), .BC(1), .NTRIAL(NT)) u11 (.clk, .done_o(done[4]), .checks_o(chk[4]), .failures_o(fail[4]), .working_o(work[4]));
  ft_link_trial #(.FC(35), .BC(3), .NTRIAL(NT)) u38 (.clk, .done_o(done[5]), .checks_o(chk[5]), .failures_o(fail[5]), .working_o(work[5]));

  int checks = 0, failures = 0;
  localparam int SPARES [NCFG] = '{2, 3, 4, 7, 11, 38};

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (done == '1);
    for (int i = 0; i < NCFG; i++) begin
      checks += chk[i]; failures += fail[i];
      $display("%2d extra pads: %0d of %0d links working after repair", SPARES[i], work[i], NT);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
