// mult_controller_tb -- self-checking test of mult_controller.
//
// Part 1 checks the transition and output equations of seq_mult_pkg for all
// 8 state codes and all 8 input combinations against the controller tables
// copied into this testbench as constants (including codes 6 and 7, which
// must return to state 0 with done=0 and no loads).
// Part 2 runs the controller module for 3000 cycles with random start and
// status inputs and checks its state, done and control outputs each cycle
// against those same tables.
module mult_controller_tb;
  import seq_mult_pkg::*;

  logic    clk = 1'b0;
  logic    rst, start;
  status_t status;
  logic    done;
  ctrl_t   ctrl;
  state_t  state;
  int checks = 0, failures = 0;
  int visits [8];

  mult_controller dut (.clk, .rst, .start, .status, .done, .ctrl, .state);

  always #5 clk = ~clk;

  // Expected next state from the transition table.
  function automatic int exp_next(int s, bit st, bit z, bit o);
    case (s)
      0: return st ? 1 : 0;
      1: return 2;
      2: return z ? 0 : 3;
      3: return o ? 4 : 5;
      4: return 5;
      5: return 2;
      default: return 0;
    endcase
  endfunction

  // Expected {done, p_load, a_load, b_load} and, where loaded, the selects.
  // Row order: done p_load p_sel a_load a_sel b_load b_sel (don't care as 0).
  localparam bit [6:0] OUT_TABLE [8] = '{
    7'b1_0_0_0_0_0_0,   // 0
    7'b0_1_0_1_0_1_0,   // 1
    7'b0_0_0_0_0_0_0,   // 2
    7'b0_0_0_0_0_0_0,   // 3
    7'b0_1_1_0_0_0_0,   // 4
    7'b0_0_0_1_1_1_1,   // 5
    7'b0_0_0_0_0_0_0,   // 6
    7'b0_0_0_0_0_0_0    // 7
  };

  function automatic bit [6:0] pack_out(logic d, ctrl_t c);
    return {d, c.p_load, c.p_sel, c.a_load, c.a_sel, c.b_load, c.b_sel};
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_s;
    // Part 1: equations, exhaustively.
    for (int s = 0; s < 8; s++) begin
      for (int i = 0; i < 8; i++) begin
        status_t stv;
        stv.b_zero = i[1]; stv.b_odd = i[0];
        check($sformatf("next(%0d,%0d)", s, i),
              int'(next_state(state_t'(s), i[2], stv)), exp_next(s, i[2], i[1], i[0]));
      end
      check($sformatf("outputs(%0d)", s),
            int'(pack_out(done_out(state_t'(s)), ctrl_out(state_t'(s)))), int'(OUT_TABLE[s]));
    end
    // Part 2: the module.
    rst = 1'b1; start = 1'b0; status = '0;
    @(posedge clk); #1;
    rst = 1'b0; exp_s = 0;
    repeat (3000) begin
      check("state", int'(state), exp_s);
      check("outputs", int'(pack_out(done, ctrl)), int'(OUT_TABLE[exp_s]));
      visits[exp_s]++;
      start  = $urandom_range(0, 1) == 1;
      status.b_zero = $urandom_range(0, 3) == 0;
      status.b_odd  = $urandom_range(0, 1) == 1;
      @(posedge clk); #1;
      exp_s = exp_next(exp_s, start, status.b_zero, status.b_odd);
    end
    for (int s = 0; s < 6; s++) begin
      checks++;
      if (visits[s] == 0) begin
        failures++;
        $display("FAIL state %0d never visited", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
