// Test sequencer of one link end's TSV scan chains.
//
// Runs the on-chip steps of the TSV test: (1) shift a test vector into the
// inject chain, (2) keep it driven across the TSVs while flow control is
// disabled, (3) capture the far side's pads and shift them out. Step 4 (the
// off-chip failure-map analysis) and step 5 (programming the OTP memory) are
// done by the tester. The tester raises test_en for the whole session, which
// selects the inject chain onto the outgoing pads and clamps flow control.
//
// Interface and timing (this design's choice; the paper says only that a
// simple FSM drives the scan chain groups):
//   start_i   (pulse, in IDLE or DRIVE) -> SHIFT_IN for INJ_LEN cycles, one
//             bit per cycle (inj_shift_o high), then DRIVE.
//   capture_i (pulse, in IDLE or DRIVE) -> one CAPTURE cycle (cap_load_o),
//             then SHIFT_OUT for CAP_LEN cycles (cap_shift_o), then DRIVE.
//   busy_o is high in SHIFT_IN, CAPTURE and SHIFT_OUT. Dropping test_en
//   returns to IDLE.
module tsv_test_ctrl #(
  parameter int unsigned INJ_LEN = 35,
  parameter int unsigned CAP_LEN = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic test_en_i,
  input  logic start_i,
  input  logic capture_i,
  output logic inj_shift_o,
  output logic cap_load_o,
  output logic cap_shift_o,
  output logic busy_o
);

  typedef enum logic [2:0] {IDLE, SHIFT_IN, DRIVE, CAPTURE, SHIFT_OUT} state_t;

  localparam int unsigned MAXLEN = (INJ_LEN > CAP_LEN) ? INJ_LEN : CAP_LEN;
  localparam int unsigned CNT_W  = $clog2(MAXLEN + 1);

  state_t           state_q, state_d;
  logic [CNT_W-1:0] cnt_q, cnt_d;

  always_comb begin
    state_d = state_q;
    cnt_d   = cnt_q;
    unique case (state_q)
      IDLE, DRIVE: begin
        if (start_i) begin
          state_d = SHIFT_IN;
          cnt_d   = CNT_W'(INJ_LEN - 1);
        end else if (capture_i) begin
          state_d = CAPTURE;
        end
      end
      SHIFT_IN: begin
        if (cnt_q == '0) state_d = DRIVE;
        else             cnt_d   = cnt_q - 1'b1;
      end
      CAPTURE: begin
        state_d = SHIFT_OUT;
        cnt_d   = CNT_W'(CAP_LEN - 1);
      end
      SHIFT_OUT: begin
        if (cnt_q == '0) state_d = DRIVE;
        else             cnt_d   = cnt_q - 1'b1;
      end
      default: state_d = IDLE;
    endcase
    if (!test_en_i) state_d = IDLE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= IDLE;
      cnt_q   <= '0;
    end else begin
      state_q <= state_d;
      cnt_q   <= cnt_d;
    end
  end

  assign inj_shift_o = (state_q == SHIFT_IN);
  assign cap_load_o  = (state_q == CAPTURE);
  assign cap_shift_o = (state_q == SHIFT_OUT);
  assign busy_o      = (state_q == SHIFT_IN) || (state_q == CAPTURE) || (state_q == SHIFT_OUT);

endmodule
