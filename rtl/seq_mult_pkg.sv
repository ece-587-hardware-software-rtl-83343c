// seq_mult_pkg -- types and state logic shared by the sequential multiplier.
//
// The multiplier is a finite state machine with data (FSMD): a controller
// steps through six states and drives six control signals into a datapath
// that holds the variables prod, a and b. This package holds the bundle of
// control signals (controller to datapath), the bundle of status signals
// (datapath to controller), the state encoding, and the controller's
// transition and output equations written as pure functions, so that the
// controller module and its testbench use one definition.
//
// The six states, their 3-bit encoding 0..5, the transition table and the
// output table follow the lecture's controller design. The unused codes 6
// and 7 go back to state 0 and drive done=0, as the lecture requires. Where
// the output table leaves a select "don't care", this design drives 0; in
// codes 6 and 7, where every output except done is "don't care", it drives
// all loads to 0 so that an illegal state never changes a variable.
package seq_mult_pkg;

  // Controller state, 3 bits. Names describe the block each state stands for.
  typedef enum logic [2:0] {
    S_IDLE  = 3'd0,  // Out=prod; done=1; wait for start
    S_INIT  = 3'd1,  // a=A; b=B; prod=0
    S_TESTZ = 3'd2,  // test b == 0
    S_TESTO = 3'd3,  // test b odd
    S_ADD   = 3'd4,  // prod = prod + a
    S_SHIFT = 3'd5,  // a = a*2; b = b/2
    S_BAD6  = 3'd6,  // unused code
    S_BAD7  = 3'd7   // unused code
  } state_t;

  // Control signals from controller to datapath. A select of 0 picks the
  // mux input that loads a new job (constant 0, A, B); 1 picks the update
  // inside the loop (prod+a, a*2, b/2).
  typedef struct packed {
    logic p_sel;
    logic p_load;
    logic a_sel;
    logic a_load;
    logic b_sel;
    logic b_load;
  } ctrl_t;

  // Status signals from datapath to controller.
  typedef struct packed {
    logic b_zero;  // b == 0
    logic b_odd;   // b[0]
  } status_t;

  // Transition equation S(t+1) = f(S(t), start, b_zero, b_odd).
  function automatic state_t next_state(state_t s, logic start, status_t st);
    unique case (s)
      S_IDLE:  return start     ? S_INIT  : S_IDLE;
      S_INIT:  return S_TESTZ;
      S_TESTZ: return st.b_zero ? S_IDLE  : S_TESTO;
      S_TESTO: return st.b_odd  ? S_ADD   : S_SHIFT;
      S_ADD:   return S_SHIFT;
      S_SHIFT: return S_TESTZ;
      default: return S_IDLE;   // codes 6 and 7 recover to idle
    endcase
  endfunction

  // Output equation: done as a function of the state only (Moore output).
  function automatic logic done_out(state_t s);
    return s == S_IDLE;
  endfunction

  // Output equation: datapath control signals as a function of the state.
  function automatic ctrl_t ctrl_out(state_t s);
    ctrl_t c;
    c = '0;
    unique case (s)
      S_INIT: begin
        c.p_load = 1'b1; c.p_sel = 1'b0;
        c.a_load = 1'b1; c.a_sel = 1'b0;
        c.b_load = 1'b1; c.b_sel = 1'b0;
      end
      S_ADD: begin
        c.p_load = 1'b1; c.p_sel = 1'b1;
      end
      S_SHIFT: begin
        c.a_load = 1'b1; c.a_sel = 1'b1;
        c.b_load = 1'b1; c.b_sel = 1'b1;
      end
      default: ;                // idle, tests, unused codes: hold everything
    endcase
    return c;
  endfunction

endpackage
