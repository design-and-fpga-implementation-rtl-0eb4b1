// fir_datapath: parallel datapath of the four-tap FIR filter,
//   y[n] = W0*x[n] + W1*x[n-1] + W2*x[n-2] + W3*x[n-3]  (mod 2^16).
//
// A 2-to-4 decoder driven by Load_en, Ld_1 and Ld_0 writes the coefficient
// bus into one of W0..W3. Four data registers hold x[n]..x[n-3] (load,
// move, clear). Four multipliers form Wk*X(n-k) in parallel; three 16-bit
// adders sum them in the published order ((W1*Xn-1 + W0*Xn) + W2*Xn-2) +
// W3*Xn-3, with carry in 0 and carry outs unused; the output register
// latches the sum on YL. The structure and sizes follow the published
// datapath. The products are registered (see mult8x8), so the sum latched on
// YL is formed from the data as it stood before the last move; that
// register is this design's choice.
//
// Timing for one sample, one control word per clock: D_load (x[n] into Xn),
// D_move (products of x[n]..x[n-3] registered, delay line shifted), YL
// (y_out updated at the end of that clock).
//
// Interface: clk, reset (synchronous, active high), ctrl, coeff_in, x_in in;
// y_out out, registered.
module fir_datapath
  import fir_pkg::*;
#(
  parameter int unsigned W  = DATA_W,
  parameter int unsigned YW = ACC_W
) (
  input  logic         clk,
  input  logic         reset,
  input  ctrl_t        ctrl,
  input  logic [W-1:0] coeff_in,
  input  logic [W-1:0] x_in,
  output logic [YW-1:0] y_out
);

  logic [TAPS-1:0]         coeff_load;
  logic [TAPS-1:0][W-1:0]  w;
  logic [TAPS-1:0][W-1:0]  x;
  logic [TAPS-1:0][2*W-1:0] prod;
  logic [YW-1:0]           s1, s2, s3;
  logic                    c1, c2, c3;

  coeff_decoder_2to4 u_dec (
    .en  (ctrl.load_en),
    .sel ({ctrl.ld1, ctrl.ld0}),
    .y   (coeff_load)
  );

  coeff_registers #(.W(W), .TAPS(TAPS)) u_coeff (
    .clk      (clk),
    .reset    (reset),
    .load     (coeff_load),
    .coeff_in (coeff_in),
    .w        (w)
  );

  data_registers #(.W(W), .TAPS(TAPS)) u_data (
    .clk     (clk),
    .reset   (reset),
    .d_load  (ctrl.d_load),
    .d_move  (ctrl.d_move),
    .d_clear (ctrl.d_clear),
    .x_in    (x_in),
    .x       (x)
  );

  for (genvar k = 0; k < TAPS; k++) begin : g_mult
    mult8x8 #(.W(W)) u_mult (
      .clk (clk),
      .a   (w[k]),
      .b   (x[k]),
      .p   (prod[k])
    );
  end

  // Carry outs c1..c3 are not used: the sum wraps modulo 2^YW.
  adder16 #(.W(YW)) u_add1 (.a(YW'(prod[1])), .b(YW'(prod[0])), .cin(1'b0), .s(s1), .cout(c1));
  adder16 #(.W(YW)) u_add2 (.a(YW'(prod[2])), .b(s1),           .cin(1'b0), .s(s2), .cout(c2));
  adder16 #(.W(YW)) u_add3 (.a(YW'(prod[3])), .b(s2),           .cin(1'b0), .s(s3), .cout(c3));

  output_register #(.W(YW)) u_out (
    .clk   (clk),
    .reset (reset),
    .load  (ctrl.yl),
    .d     (s3),
    .q     (y_out)
  );

endmodule
