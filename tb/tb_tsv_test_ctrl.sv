// Self-checking test of the TSV test sequencer: counts the cycles of each
// phase (INJ_LEN shift-in cycles, one capture cycle, CAP_LEN shift-out
// cycles), checks that nothing happens without test_en and that dropping
// test_en aborts a sequence. Then 4000 cycles of random test_en, start and
// capture are compared every cycle with a cycle model of the sequencer
// (phase and cycles left), written from the specified timing.
module tb_tsv_test_ctrl;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic test_en = 0, start = 0, capture = 0;
  logic inj_shift, cap_load, cap_shift, busy;

  localparam int INJ = 35, CAP = 4;

  tsv_test_ctrl #(.INJ_LEN(INJ), .CAP_LEN(CAP)) dut (
    .clk, .rst_n, .test_en_i(test_en), .start_i(start), .capture_i(capture),
    .inj_shift_o(inj_shift), .cap_load_o(cap_load), .cap_shift_o(cap_shift), .busy_o(busy));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  // Cycle model: which phase the sequencer is in and how many cycles remain.
  typedef enum {M_NONE, M_INJ, M_CAP, M_OUT} mph_t;
  mph_t mph = M_NONE;
  int   mrem = 0, n_inj_done = 0, n_out_done = 0;
  bit   model_on = 0;
  always @(posedge clk) if (model_on) begin
    if (!test_en) mph = M_NONE;
    else case (mph)
      M_NONE: if (start) begin mph = M_INJ; mrem = INJ; end
              else if (capture) mph = M_CAP;
      M_INJ:  begin mrem--; if (mrem == 0) begin mph = M_NONE; n_inj_done++; end end
      M_CAP:  begin mph = M_OUT; mrem = CAP; end
      M_OUT:  begin mrem--; if (mrem == 0) begin mph = M_NONE; n_out_done++; end end
    endcase
  end

  // Count cycles with each output high until busy drops.
  task automatic run_phase(output int n_inj, output int n_load, output int n_shift);
    n_inj = 0; n_load = 0; n_shift = 0;
    // the current cycle is the first one of the phase
    do begin
      n_inj += int'(inj_shift); n_load += int'(cap_load); n_shift += int'(cap_shift);
      @(negedge clk);
    end while (busy);
  endtask

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b, c;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // No test mode: start is ignored.
    start = 1; @(negedge clk); start = 0;
    repeat (3) @(negedge clk);
    check(!busy && !inj_shift, "idle without test_en");
    // Shift in.
    test_en = 1;
    start = 1; @(negedge clk); start = 0;
    check(inj_shift, "shift starts one cycle after start");
    run_phase(a, b, c);
    check(a == INJ, $sformatf("inject cycles %0d", a));
    check(b == 0 && c == 0, "no capture during inject");
    // Capture and shift out.
    capture = 1; @(negedge clk); capture = 0;
    check(cap_load, "capture cycle");
    run_phase(a, b, c);
    check(b == 1 && c == CAP && a == 0, $sformatf("capture %0d shift %0d", b, c));
    // Abort.
    start = 1; @(negedge clk); start = 0;
    repeat (5) @(negedge clk);
    test_en = 0; @(negedge clk);
    check(!busy && !inj_shift, "abort when test_en drops");
    // Random commands against the cycle model.
    model_on = 1;
    for (int i = 0; i < 4000; i++) begin
      check(inj_shift == (mph == M_INJ) && cap_load == (mph == M_CAP) &&
            cap_shift == (mph == M_OUT) && busy == (mph != M_NONE),
            $sformatf("cycle %0d: outputs %b%b%b%b, model phase %s", i,
                      inj_shift, cap_load, cap_shift, busy, mph.name()));
      test_en = ($urandom_range(0, 149) != 0);
      start   = ($urandom_range(0, 11) == 0);
      capture = ($urandom_range(0, 11) == 0);
      @(negedge clk);
    end
    check(n_inj_done > 0 && n_out_done > 0,
          $sformatf("complete sequences: %0d inject, %0d shift-out", n_inj_done, n_out_done));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
