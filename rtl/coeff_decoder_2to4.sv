// coeff_decoder_2to4: 2-to-4 decoder with enable that picks which tap
// coefficient register loads from the coefficient bus.
//
// When en (Load_en) is high, output sel = {Ld_1, Ld_0} is set and the other
// three are clear; when en is low all outputs are clear. Output i drives the
// load of coefficient register Wi, as in the published datapath.
//
// Interface: en, sel (2 bits) in; y (4 bits, one-hot or zero) out.
// Purely combinational.
module coeff_decoder_2to4 (
  input  logic       en,
  input  logic [1:0] sel,
  output logic [3:0] y
);

  always_comb begin
    y = '0;
    if (en) y[sel] = 1'b1;
  end

endmodule
