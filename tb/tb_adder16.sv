// tb_adder16: corner and random operands with both carry-in values against a
// 17-bit reference sum (sum and carry out).
module tb_adder16;
  int checks = 0, failures = 0;
  logic [15:0] a, b, s;
  logic cin, cout;
  logic [16:0] ref_sum;

  adder16 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    for (int i = 0; i < 2000; i++) begin
      case (i)
        0: begin a = 16'hFFFF; b = 16'h0000; cin = 1'b1; end
        1: begin a = 16'hFFFF; b = 16'hFFFF; cin = 1'b1; end
        2: begin a = 16'h8000; b = 16'h8000; cin = 1'b0; end
        default: begin a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom); end
      endcase
      #1;
      ref_sum = 17'(int'(a) + int'(b) + int'(cin));
      checks++;
      if ({cout, s} !== ref_sum) begin
        failures++;
        $display("FAIL %0d+%0d+%0d: got %0d expected %0d", a, b, cin, {cout, s}, ref_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
