// mult_controller -- six-state controller of the sequential multiplier.
//
// A Moore machine with a 3-bit state register S. Its transition and output
// equations are the functions next_state, done_out and ctrl_out of
// seq_mult_pkg, which encode the lecture's transition and output tables:
//   0 idle (done=1) --start--> 1 load --> 2 test b==0
//   2 --b_zero--> 0,  2 --else--> 3 test b odd
//   3 --b_odd--> 4 add --> 5,  3 --else--> 5 shift --> 2
//   6, 7 (unused codes) --> 0
// Inputs: start from the user, status (b_zero, b_odd) from the datapath.
// Outputs: done and the control bundle for the datapath, both functions of
// the state only, so they change one cycle after the edge that moves S.
//
// Two assertions check that a and b always get equal load/select values and
// that the state stays within the six used codes after reset.
//
// The synchronous, active-high reset to state 0 is this design's choice.
module mult_controller
  import seq_mult_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    start,
  input  status_t status,
  output logic    done,
  output ctrl_t   ctrl,
  output state_t  state     // current state S, for observation
);

  state_t s_q;

  always_ff @(posedge clk) begin
    if (rst) s_q <= S_IDLE;
    else     s_q <= next_state(s_q, start, status);
  end

  assign done  = done_out(s_q);
  assign ctrl  = ctrl_out(s_q);
  assign state = s_q;

  // The output table gives a and b the same load and select in every state,
  // which is what lets the two registers share these signals.
  a_b_ctrl_shared: assert property (@(posedge clk) disable iff (rst)
    ctrl.a_load == ctrl.b_load && ctrl.a_sel == ctrl.b_sel);

  // The state register never leaves the six used codes once reset.
  state_legal: assert property (@(posedge clk) disable iff (rst)
    s_q inside {S_IDLE, S_INIT, S_TESTZ, S_TESTO, S_ADD, S_SHIFT});

endmodule
