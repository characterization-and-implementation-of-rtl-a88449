// Behavioural model of the one-time-programmable (fuse) memory that holds a
// link end's crossbar configuration.
//
// A fuse starts intact (reads 0) and, once blown, reads 1 for ever: asserting
// prog_en for one clock blows every fuse whose prog_data bit is 1; bits that
// are already 1 cannot be cleared, and reset does not affect the contents.
// The stored word is always visible on q. The fuse array is a process macro,
// not logic; this model gives its function for simulation. The paper calls
// it a small OTP memory, e.g. a fuse ROM, programmed after the off-chip analysis
// of the test results; its word width and programming port are this design's.
module otp_rom #(
  parameter int unsigned BITS = noc3d_pkg::END_CFG_W
) (
  input  logic            clk,
  input  logic            prog_en,
  input  logic [BITS-1:0] prog_data,
  output logic [BITS-1:0] q
);

  logic [BITS-1:0] fuse = '0;

  // plain always: the fuse array has no reset, only its power-up state
  always @(posedge clk)
    if (prog_en) fuse <= fuse | prog_data;

  assign q = fuse;

endmodule
