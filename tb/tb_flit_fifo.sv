// Self-checking test of flit_fifo against a queue model under random push/pop
// (never pushing when full unless also popping, never popping when empty);
// checks order, full/empty flags and that full is reached at DEPTH entries.
module tb_flit_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0, full, empty;
  logic [31:0] din = '0, dout;
  logic [31:0] q[$];
  bit saw_full = 0;

  flit_fifo #(.W(32), .DEPTH(4)) dut (.clk, .rst_n, .push, .din, .pop, .dout, .full, .empty);

  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == 4)) begin
        failures++; $display("FAIL flags size=%0d empty=%b full=%b", q.size(), empty, full);
      end
      if (full) saw_full = 1;
      if (!empty) begin
        checks++;
        if (dout !== q[0]) begin failures++; $display("FAIL head %h exp %h", dout, q[0]); end
      end
      pop  = !empty && ($urandom_range(0, 2) == 0);
      push = ($urandom_range(0, 1) == 0) && (!full || pop);
      din  = $urandom;
      @(posedge clk);
      #1;
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
      push = 0; pop = 0;
    end
    checks++;
    if (!saw_full) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
