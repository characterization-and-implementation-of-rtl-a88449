// Self-checking test of the fuse memory model: starts all zero, blowing ORs
// bits in, nothing is ever cleared, reads are stable without prog_en.
module tb_otp_rom;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic prog_en = 0;
  logic [16:0] prog_data = '0, q, model = '0;

  otp_rom #(.BITS(17)) dut (.clk, .prog_en, .prog_data, .q);

  always #5 clk = ~clk;

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    checks++; if (q !== '0) begin failures++; $display("FAIL not blank: %h", q); end
    for (int t = 0; t < 200; t++) begin
      prog_en = ($urandom_range(0, 3) == 0);
      prog_data = 17'($urandom);
      if (prog_en) model |= prog_data;
      @(negedge clk);
      checks++;
      if (q !== model) begin failures++; $display("FAIL q=%h exp=%h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
