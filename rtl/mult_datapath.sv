// mult_datapath -- datapath of the shift-and-add sequential multiplier.
//
// Holds the three variables of the multiplication program in load registers:
//   prod  loaded with 0 (p_sel=0) or prod+a (p_sel=1)
//   a     loaded with A (a_sel=0) or a*2    (a_sel=1)
//   b     loaded with B (b_sel=0) or b/2    (b_sel=1)
// Each register changes only when its load signal is 1. The multiply by two
// and divide by two are fixed one-bit shifts (a << 1, b >> 1, unsigned), so
// the product is formed modulo 2**W, as the W-bit Out port implies. Status
// outputs go to the controller: b_zero is 1 when b is 0 and b_odd is b[0].
// Out is wired straight to the prod register, as in the lecture's datapath.
//
// The register set, mux inputs, adder, shifters and status signals follow
// the lecture's datapath drawing; the reset input (clears all three
// registers) is this design's choice.
//
// Timing: registers update on the rising edge after the control signals are
// presented; status and Out are combinational from the registers.
module mult_datapath
  import seq_mult_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] a_in,     // operand A
  input  logic [W-1:0] b_in,     // operand B
  input  ctrl_t        ctrl,     // control signals from the controller
  output status_t      status,   // b_zero, b_odd to the controller
  output logic [W-1:0] prod_out  // Out
);

  logic [W-1:0] prod, a, b;
  logic [W-1:0] prod_d, a_d, b_d;

  // Operand/result routing muxes.
  always_comb begin
    prod_d = ctrl.p_sel ? (prod + a) : '0;
    a_d    = ctrl.a_sel ? (a << 1)   : a_in;
    b_d    = ctrl.b_sel ? (b >> 1)   : b_in;
  end

  load_reg #(.W(W)) u_reg_prod (.clk, .rst, .load(ctrl.p_load), .din(prod_d), .dout(prod));
  load_reg #(.W(W)) u_reg_a    (.clk, .rst, .load(ctrl.a_load), .din(a_d),    .dout(a));
  load_reg #(.W(W)) u_reg_b    (.clk, .rst, .load(ctrl.b_load), .din(b_d),    .dout(b));

  assign status.b_zero = (b == '0);
  assign status.b_odd  = b[0];
  assign prod_out      = prod;

endmodule
