// coeff_registers: the four tap-coefficient registers W0..W3 of the filter.
//
// Register Wi takes the coefficient bus on a clock edge where load[i] is
// high and holds otherwise; the loads come from the 2-to-4 decoder, so one
// coefficient is written per clock. Four 8-bit registers follow the
// published datapath; the synchronous reset to zero is this design's choice.
//
// Interface: clk, reset, load (4 bits), coeff_in (W bits) in; w[0..TAPS-1]
// out, registered.
module coeff_registers #(
  parameter int unsigned W    = 8,
  parameter int unsigned TAPS = 4
) (
  input  logic                clk,
  input  logic                reset,
  input  logic [TAPS-1:0]     load,
  input  logic [W-1:0]        coeff_in,
  output logic [TAPS-1:0][W-1:0] w
);

  always_ff @(posedge clk) begin
    if (reset) begin
      w <= '0;
    end else begin
      for (int i = 0; i < TAPS; i++)
        if (load[i]) w[i] <= coeff_in;
    end
  end

endmodule
