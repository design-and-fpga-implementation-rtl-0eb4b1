// tb_mult8x8: corner and random operands; the product must appear exactly one
// clock after the operands (registered output).
module tb_mult8x8;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [7:0] a, b;
  logic [15:0] p, expect_p;

  mult8x8 dut (.clk(clk), .a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin
    a = 0; b = 0;
    @(posedge clk); #1;
    for (int i = 0; i < 1000; i++) begin
      case (i)
        0: begin a = 8'd255; b = 8'd255; end
        1: begin a = 8'd0;   b = 8'd200; end
        2: begin a = 8'd1;   b = 8'd128; end
        default: begin a = 8'($urandom); b = 8'($urandom); end
      endcase
      expect_p = 16'(int'(a) * int'(b));
      @(posedge clk); #1;
      checks++;
      if (p !== expect_p) begin
        failures++;
        $display("FAIL %0d*%0d: got %0d expected %0d", a, b, p, expect_p);
      end
    end
    // Latency: new operands must not reach p before the next clock edge.
    a = 8'd3; b = 8'd7;
    #1;
    checks++;
    if (p !== expect_p) begin
      failures++;
      $display("FAIL product changed before the clock edge");
    end
    @(posedge clk); #1;
    checks++;
    if (p !== 16'd21) begin
      failures++;
      $display("FAIL 3*7: got %0d", p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
