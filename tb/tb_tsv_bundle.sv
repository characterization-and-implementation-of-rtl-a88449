// Self-checking test of the TSV bundle model: healthy vias pass the value,
// open vias read 0 on the far tier.
module tb_tsv_bundle;
  int checks = 0, failures = 0;
  logic [37:0] top, opens, bot;

  tsv_bundle #(.N(38)) dut (.top_i(top), .open_i(opens), .bot_o(bot));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      top = {$urandom, $urandom};
      opens = '0;
      for (int k = 0; k < 3; k++) opens[$urandom_range(0, 37)] = 1'b1;
      #1;
      for (int i = 0; i < 38; i++) begin
        checks++;
        if (bot[i] !== (opens[i] ? 1'b0 : top[i])) begin
          failures++; $display("FAIL bit %0d", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
