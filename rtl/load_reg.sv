// load_reg -- W-bit register with a load enable (Reg_prod, Reg_a, Reg_b).
//
// On each rising clock edge Dout takes Din when load is 1 and keeps its value
// otherwise. This is the register element of the multiplier's datapath; the
// lecture draws it with ports Din, Dout, load and CLK. The synchronous,
// active-high reset that clears Dout to 0 is this design's addition, so that
// Out reads 0 rather than an arbitrary value before the first job.
//
// Timing: one cycle from Din/load to Dout. Reset has priority over load.
module load_reg #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  always_ff @(posedge clk) begin
    if (rst)       dout <= '0;
    else if (load) dout <= din;
  end

endmodule
