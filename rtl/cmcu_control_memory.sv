// cmcu_control_memory: the 8x8 control memory of the microprogram control
// unit, a constant ROM read combinationally from the program counter.
//
// Word k-1 holds microinstruction k of the filter's microprogram:
//   addr  Y0 Load_en Ld_1 Ld_0 D_clear D_load D_move YL   operation
//    0     0    1     0    0     0      0      0    0    load h0
//    1     0    1     0    1     0      0      0    0    load h1
//    2     0    1     1    0     0      0      0    0    load h2
//    3     0    1     1    1     1      0      0    0    load h3, clear data
//    4     0    0     0    0     0      1      0    0    load input x[n]
//    5     0    0     0    0     0      0      1    0    move data
//    6     1    0     0    0     0      0      0    1    latch y[n], branch
// The table, its size and the bit that drives the program counter are the
// published design's. Address 7 is unused by the microprogram; here it holds
// a word with no datapath action and Y0 set, so a stray PC branches to 4.
// The bit order inside the word is this design's choice (see fir_pkg).
//
// Interface: addr (3 bits) in, uinstr (8 bits) out, no clock.
module cmcu_control_memory
  import fir_pkg::*;
(
  input  logic [PC_W-1:0] addr,
  output uinstr_t         uinstr
);

  always_comb begin
    unique case (addr)
      3'd0:    uinstr = 8'b0_100_0000;
      3'd1:    uinstr = 8'b0_101_0000;
      3'd2:    uinstr = 8'b0_110_0000;
      3'd3:    uinstr = 8'b0_111_1000;
      3'd4:    uinstr = 8'b0_000_0100;
      3'd5:    uinstr = 8'b0_000_0010;
      3'd6:    uinstr = 8'b1_000_0001;
      default: uinstr = 8'b1_000_0000;
    endcase
  end

endmodule
