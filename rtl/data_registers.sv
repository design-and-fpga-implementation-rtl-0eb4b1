// data_registers: the four data registers of the filter, Xn, Xn-1, Xn-2 and
// Xn-3, forming the tapped delay line.
//
// d_load writes the input sample into Xn. d_move shifts the line:
// Xn-1 <= Xn, Xn-2 <= Xn-1, Xn-3 <= Xn-2. d_clear clears Xn-1..Xn-3 (the
// published datapath draws a clear input only on those three; Xn is always
// loaded before it is used) and wins over d_move. These operations are the
// published design's; the synchronous reset of all four registers is this
// design's choice. x[k] is X(n-k).
//
// Interface: clk, reset, d_load, d_move, d_clear, x_in (W bits) in;
// x[0..TAPS-1] out, registered.
module data_registers #(
  parameter int unsigned W    = 8,
  parameter int unsigned TAPS = 4
) (
  input  logic                   clk,
  input  logic                   reset,
  input  logic                   d_load,
  input  logic                   d_move,
  input  logic                   d_clear,
  input  logic [W-1:0]           x_in,
  output logic [TAPS-1:0][W-1:0] x
);

  always_ff @(posedge clk) begin
    if (reset) begin
      x <= '0;
    end else begin
      if (d_load) x[0] <= x_in;
      for (int k = 1; k < TAPS; k++) begin
        if (d_clear)     x[k] <= '0;
        else if (d_move) x[k] <= x[k-1];
      end
    end
  end

endmodule
