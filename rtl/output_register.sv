// output_register: the register that holds the filter output.
//
// On a clock edge where load (YL, microinstruction 6) is high it takes the
// adder-chain sum; otherwise it holds, so the output changes once per sample.
// The 16-bit width and the load are the published design's; the synchronous
// reset to zero is this design's choice.
//
// Interface: clk, reset, load, d (W bits) in; q (W bits) out, registered.
module output_register #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (reset)     q <= '0;
    else if (load) q <= d;
  end

endmodule
