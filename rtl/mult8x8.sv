// mult8x8: unsigned W x W multiplier with a 2W-bit product, one per tap.
//
// With OUT_REG = 1 (the default) the product is registered on every clock,
// like the output register of an FPGA's hard multiplier block; with
// OUT_REG = 0 it is combinational. The published datapath draws no register
// here. This design registers it because the microprogram moves the delay
// line (microinstruction 5) one clock before it latches the output
// (microinstruction 6): the registered products still hold x[n]..x[n-3] taken
// before the move, which gives the published filter outputs. That reading is
// this design's choice; the multiplier size is the published one.
//
// Interface: clk, a, b (W bits) in; p (2W bits) out, one clock after a and b
// when OUT_REG = 1.
module mult8x8 #(
  parameter int unsigned W       = 8,
  parameter bit          OUT_REG = 1'b1
) (
  input  logic           clk,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);

  logic [2*W-1:0] prod;

  assign prod = a * b;

  if (OUT_REG) begin : g_reg
    always_ff @(posedge clk) p <= prod;
  end else begin : g_comb
    assign p = prod;
  end

endmodule
