// load_reg_tb -- self-checking test of load_reg.
//
// Drives random load and data values for 400 cycles at W=32 and compares
// Dout each cycle with a reference register kept in the testbench. Also
// checks that reset clears Dout and beats a simultaneous load.
module load_reg_tb;
  localparam int unsigned W = 32;

  logic         clk = 1'b0;
  logic         rst, load;
  logic [W-1:0] din, dout, ref_q;
  int checks = 0, failures = 0;

  load_reg #(.W(W)) dut (.clk, .rst, .load, .din, .dout);

  always #5 clk = ~clk;

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; load = 1'b1; din = 32'hFFFF_FFFF;
    @(posedge clk); #1;
    check("reset beats load", dout, '0);
    rst = 1'b0; ref_q = '0;
    repeat (400) begin
      load = $urandom_range(0, 1) == 1;
      din  = $urandom;
      @(posedge clk);
      if (load) ref_q = din;
      #1;
      check("dout", dout, ref_q);
    end
    rst = 1'b1; load = 1'b0;
    @(posedge clk); #1;
    check("reset", dout, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
