// seq_mult -- sequential shift-and-add multiplier (controller + datapath).
//
// Multiplies two W-bit unsigned numbers A and B and returns the low W bits
// of the product on Out. The product is built by the loop
//   prod=0; while (b != 0) { if (b odd) prod += a; a *= 2; b /= 2; }
// run one block per clock cycle by mult_controller, with the variables held
// in mult_datapath.
//
// Interface: done=1 means Out holds the product of the previous job and the
// unit is idle. A job starts when start=1 while done=1; done drops on the
// next cycle. A and B are captured in the cycle after start was seen, so
// they must be held valid for that cycle too. When the job ends, done
// returns to 1 with the product on Out, which stays put until the next job.
//
// Latency: with L the bit length of B (0 for B=0) and k the number of ones
// in B, done is 0 for 2 + 3*L + k cycles after the start cycle.
//
// The structure and the handshake follow the lecture's multiplier
// architecture; the reset (synchronous, active high) is this design's.
module seq_mult
  import seq_mult_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] a_in,
  input  logic [W-1:0] b_in,
  output logic [W-1:0] prod_out,
  output logic         done,
  output logic [2:0]   state     // controller state S, for observation
);

  ctrl_t   ctrl;
  status_t status;
  state_t  s;

  mult_controller u_ctrl (
    .clk, .rst, .start, .status, .done, .ctrl, .state(s)
  );

  mult_datapath #(.W(W)) u_dp (
    .clk, .rst, .a_in, .b_in, .ctrl, .status, .prod_out
  );

  assign state = s;

endmodule
