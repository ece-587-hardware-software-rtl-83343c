// seq_mult_tb -- end-to-end test of the sequential multiplier at its
// default size (W=32, no parameter override).
//
// Runs directed jobs (B=0, A=0, B=1, all ones, single high bit) and 400
// random jobs. For every job it checks:
//   * the product on Out against A*B mod 2**32 computed here,
//   * the busy time: done stays 0 for 2 + 3*L + k cycles after the start
//     cycle, L the bit length of B and k its number of ones,
//   * that Out holds still while the unit is idle.
// A and B are held for the start cycle and the cycle after it, then replaced
// by random values, and start is toggled at random while the unit is busy:
// neither may disturb the job. The testbench counts how often each
// mechanism occurs (idle wait, job start, start ignored while busy, add step,
// skipped add, exit on b==0, job with B=0) and counts a failure for any that
// never occurred.
module seq_mult_tb;
  localparam int unsigned W = 32;

  logic         clk = 1'b0;
  logic         rst, start, done;
  logic [W-1:0] a_in, b_in, prod_out;
  logic [2:0]   state;
  int checks = 0, failures = 0;
  int n_idle_wait = 0, n_start = 0, n_busy_start = 0, n_add = 0,
      n_skip_add = 0, n_exit = 0, n_b_zero_job = 0;

  seq_mult dut (.clk, .rst, .start, .a_in, .b_in, .prod_out, .done, .state);

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int bit_len(logic [W-1:0] v);
    int n = 0;
    for (int i = 0; i < W; i++) if (v[i]) n = i + 1;
    return n;
  endfunction

  function automatic int ones(logic [W-1:0] v);
    int n = 0;
    for (int i = 0; i < W; i++) n += int'(v[i]);
    return n;
  endfunction

  // Runs one job; the unit must be idle on entry.
  task automatic run_job(logic [W-1:0] x, logic [W-1:0] y);
    logic [W-1:0] expect_p;
    int lat, exp_lat;
    logic [2:0] prev;
    // Some idle cycles first: Out must not move.
    repeat ($urandom_range(0, 2)) begin
      logic [W-1:0] held = prod_out;
      start = 1'b0; a_in = $urandom; b_in = $urandom;
      @(posedge clk); #1;
      n_idle_wait++;
      check("idle stays idle", int'(done), 1);
      check("Out holds while idle", prod_out, held);
    end
    expect_p = x * y;
    exp_lat  = 2 + 3 * bit_len(y) + ones(y);
    if (y == 0) n_b_zero_job++;
    start = 1'b1; a_in = x; b_in = y;
    @(posedge clk); #1;
    n_start++;
    check("done drops after start", int'(done), 0);
    lat = 0;
    prev = state;
    while (!done && lat < 1000) begin
      lat++;
      // Operands stay valid for the cycle after start, then change.
      if (lat > 1) begin a_in = $urandom; b_in = $urandom; end
      start = $urandom_range(0, 1) == 1;
      if (start) n_busy_start++;
      @(posedge clk); #1;
      if (state == 3'd4) n_add++;
      if (prev == 3'd3 && state == 3'd5) n_skip_add++;
      if (prev == 3'd2 && state == 3'd0) n_exit++;
      prev = state;
    end
    start = 1'b0;
    check($sformatf("latency for B=%0d", y), lat, exp_lat);
    check($sformatf("product %0d*%0d", x, y), prod_out, expect_p);
  endtask

  initial begin
    #50000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; start = 1'b0; a_in = '0; b_in = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check("done after reset", int'(done), 1);
    check("Out after reset", prod_out, 0);
    run_job(32'd7, 32'd0);
    run_job(32'd0, 32'd12345);
    run_job(32'd99, 32'd1);
    run_job(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    run_job(32'd3, 32'h8000_0000);
    run_job(32'd6, 32'd7);
    repeat (400) begin
      automatic logic [W-1:0] x = $urandom, y;
      case ($urandom_range(0, 3))
        0: y = W'($urandom_range(0, 255));
        1: y = W'($urandom_range(0, 65535));
        default: y = $urandom;
      endcase
      run_job(x, y);
    end
    // Every mechanism must have happened.
    check("idle waits seen",        int'(n_idle_wait  > 0), 1);
    check("job starts seen",        int'(n_start      > 0), 1);
    check("start while busy seen",  int'(n_busy_start > 0), 1);
    check("add steps seen",         int'(n_add        > 0), 1);
    check("skipped adds seen",      int'(n_skip_add   > 0), 1);
    check("exits on b==0 seen",     int'(n_exit == n_start), 1);
    check("B=0 jobs seen",          int'(n_b_zero_job > 0), 1);
    $display("mechanisms: idle_wait=%0d start=%0d start_while_busy=%0d add=%0d skip_add=%0d exit=%0d b_zero_job=%0d",
             n_idle_wait, n_start, n_busy_start, n_add, n_skip_add, n_exit, n_b_zero_job);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
