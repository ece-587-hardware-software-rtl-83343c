// mult_datapath_tb -- self-checking test of mult_datapath.
//
// Applies random control bundles and random operands for 2000 cycles at
// W=32 and checks prod, the status bits and Out against a behavioural model
// of the three registers written here: prod <= 0 or prod+a, a <= A or a*2,
// b <= B or b/2, each only when its load is 1. Operands with b near zero are
// mixed in so that b_zero is seen both ways. Also runs one complete
// multiplication by hand (the control sequence of the controller) and
// checks the product.
module mult_datapath_tb;
  import seq_mult_pkg::*;
  localparam int unsigned W = 32;

  logic         clk = 1'b0;
  logic         rst;
  logic [W-1:0] a_in, b_in, prod_out;
  ctrl_t        ctrl;
  status_t      status;
  logic [W-1:0] mp, ma, mb;
  int checks = 0, failures = 0;
  int zero_seen = 0;

  mult_datapath #(.W(W)) dut (.clk, .rst, .a_in, .b_in, .ctrl, .status, .prod_out);

  always #5 clk = ~clk;

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic check_all();
    check("Out", prod_out, mp);
    check("b_zero", W'(status.b_zero), W'(mb == 0));
    check("b_odd", W'(status.b_odd), W'(mb % 2));
    if (mb == 0) zero_seen++;
  endtask

  // One clock with the given controls; updates the model alongside.
  task automatic step(ctrl_t c);
    ctrl = c;
    @(posedge clk);
    if (c.p_load) mp = c.p_sel ? mp + ma : 0;
    if (c.a_load) ma = c.a_sel ? ma * 2 : a_in;
    if (c.b_load) mb = c.b_sel ? mb / 2 : b_in;
    #1;
    check_all();
  endtask

  initial begin
    #300000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] x, y;
    ctrl_t c;
    rst = 1'b1; ctrl = '0; a_in = '0; b_in = '0;
    @(posedge clk); #1;
    rst = 1'b0; mp = 0; ma = 0; mb = 0;
    check_all();
    // Random control.
    repeat (2000) begin
      a_in = $urandom;
      b_in = ($urandom_range(0, 3) == 0) ? W'($urandom_range(0, 3)) : W'($urandom);
      c = ctrl_t'($urandom);
      step(c);
    end
    // One full multiplication, sequenced by the testbench.
    x = 32'd123457; y = 32'd98765;
    a_in = x; b_in = y;
    c = '0; c.p_load = 1; c.a_load = 1; c.b_load = 1;   // load job
    step(c);
    while (!status.b_zero) begin
      if (status.b_odd) begin
        c = '0; c.p_load = 1; c.p_sel = 1;              // prod += a
        step(c);
      end
      c = '0; c.a_load = 1; c.a_sel = 1; c.b_load = 1; c.b_sel = 1;  // shift
      step(c);
    end
    check("product", prod_out, x * y);
    checks++;
    if (zero_seen == 0) begin
      failures++;
      $display("FAIL b_zero never seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
