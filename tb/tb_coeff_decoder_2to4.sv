// tb_coeff_decoder_2to4: exhaustive check of the enable and the two select
// bits against the one-hot decode.
module tb_coeff_decoder_2to4;
  int checks = 0, failures = 0;
  logic en;
  logic [1:0] sel;
  logic [3:0] y, exp_y;

  coeff_decoder_2to4 dut (.en(en), .sel(sel), .y(y));

  initial begin
    for (int i = 0; i < 8; i++) begin
      {en, sel} = 3'(i);
      #1;
      exp_y = 4'b0000;
      if (en) begin
        case (sel)
          2'd0: exp_y = 4'b0001;
          2'd1: exp_y = 4'b0010;
          2'd2: exp_y = 4'b0100;
          2'd3: exp_y = 4'b1000;
        endcase
      end
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL en=%0b sel=%0d: got %b expected %b", en, sel, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
