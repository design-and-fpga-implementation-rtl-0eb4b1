// cmcu_fir: third-order (four-tap) FIR filter run by a compositional
// microprogram control unit.
//
// The control unit steps a 3-bit program counter through an 8x8 control
// memory; each word drives the datapath for one clock. After reset and a
// start request it loads the four coefficients from coeff_in on four
// consecutive clocks (W0 in the clock where start is first high at address
// 0, then W1, W2, W3) and clears the delay line. It then loops over three
// microinstructions per sample: load x_in into Xn, move the delay line,
// latch y_out. At "load x_in" it waits until start is high, so start marks
// a valid sample. Architecture, sizes and microprogram follow the
// published design; the start protocol, the product register and the
// wrap-around of the 16-bit output are this design's choices.
//
// Timing: after the four coefficient clocks, x_in is taken on the first
// clock edge where start is high; y_out for that sample changes on the third
// edge counted from that one and holds until the next sample's latch. The
// next sample can be taken on the edge right after the latch: with start
// held high the filter takes one sample every 3 clocks.
//
// Interface: clk, reset (synchronous, active high), start, coeff_in (8),
// x_in (8) in; y_out (16) out. 35 pins.
module cmcu_fir
  import fir_pkg::*;
#(
  parameter int unsigned W  = DATA_W,
  parameter int unsigned YW = ACC_W
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          start,
  input  logic [W-1:0]  coeff_in,
  input  logic [W-1:0]  x_in,
  output logic [YW-1:0] y_out
);

  ctrl_t ctrl;

  cmcu_control_unit u_cu (
    .clk   (clk),
    .reset (reset),
    .start (start),
    .ctrl  (ctrl),
    .pc    ()
  );

  fir_datapath #(.W(W), .YW(YW)) u_dp (
    .clk      (clk),
    .reset    (reset),
    .ctrl     (ctrl),
    .coeff_in (coeff_in),
    .x_in     (x_in),
    .y_out    (y_out)
  );

endmodule
