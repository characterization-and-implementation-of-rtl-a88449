// Self-checking test of rr_arbiter: grant is one-hot and a requester, and it
// is the first requester after the previously granted index (checked with an
// independent pointer model); with all five requesting, grants rotate
// 0,1,2,3,4.
module tb_rr_arbiter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [4:0] req = '0, grant;
  logic update = 0;
  int last = 4;

  rr_arbiter #(.N(5)) dut (.clk, .rst_n, .req, .update, .grant);

  always #5 clk = ~clk;

  function automatic logic [4:0] model(logic [4:0] r, int l);
    for (int k = 1; k <= 5; k++)
      if (r[(l + k) % 5]) return 5'(1) << ((l + k) % 5);
    return '0;
  endfunction

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Fair rotation under full load.
    req = '1; update = 1;
    for (int k = 0; k < 5; k++) begin
      #1;
      checks++;
      if (grant !== 5'(1) << k) begin failures++; $display("FAIL rotate %0d grant=%b", k, grant); end
      @(negedge clk);
    end
    last = 4;
    for (int t = 0; t < 2000; t++) begin
      req = 5'($urandom);
      update = 1'($urandom);
      #1;
      checks++;
      if (grant !== model(req, last)) begin
        failures++; $display("FAIL req=%b last=%0d grant=%b", req, last, grant);
      end
      if (update && grant != 0) last = $clog2(grant);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
