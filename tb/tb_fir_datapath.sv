// tb_fir_datapath: drives the datapath with the control words of the
// microprogram (coefficient loads, clear, then load/move/latch per sample),
// first with the three published test vectors and then with random
// coefficients and samples, comparing y_out with a direct convolution.
module tb_fir_datapath;
  import fir_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, reset;
  ctrl_t ctrl;
  logic [7:0] coeff_in, x_in;
  logic [15:0] y_out;

  fir_datapath dut (.clk(clk), .reset(reset), .ctrl(ctrl), .coeff_in(coeff_in),
                    .x_in(x_in), .y_out(y_out));

  always #5 clk = ~clk;

  logic [7:0] h [4];
  logic [7:0] hist [4];   // hist[k] = x[n-k]

  task automatic tick(input logic [6:0] c);
    ctrl = c;
    @(posedge clk); #1;
  endtask

  task automatic load_coeffs(input logic [7:0] c0, c1, c2, c3);
    h = '{c0, c1, c2, c3};
    coeff_in = c0; tick(7'b1000000);
    coeff_in = c1; tick(7'b1010000);
    coeff_in = c2; tick(7'b1100000);
    coeff_in = c3; tick(7'b1111000);
    coeff_in = 8'($urandom);
    for (int k = 0; k < 4; k++) hist[k] = 0;
  endtask

  task automatic sample(input logic [7:0] xv, input logic [15:0] published, input bit use_pub);
    logic [15:0] expv;
    for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = xv;
    expv = 0;
    for (int k = 0; k < 4; k++) expv = expv + 16'(h[k] * hist[k]);
    x_in = xv; tick(7'b0000100);
    x_in = 8'($urandom); tick(7'b0000010);
    tick(7'b0000001);
    checks++;
    if (y_out !== expv || (use_pub && y_out !== published)) begin
      failures++;
      $display("FAIL x=%0d: y %0d expected %0d (published %0d)", xv, y_out, expv, published);
    end
  endtask

  initial begin
    reset = 1; ctrl = '0; coeff_in = 0; x_in = 0;
    @(posedge clk); #1;
    reset = 0;
    load_coeffs(5, 4, 4, 1);
    sample(3, 15, 1); sample(9, 57, 1); sample(7, 83, 1); sample(7, 102, 1);
    load_coeffs(3, 6, 6, 5);
    sample(2, 6, 1); sample(10, 42, 1); sample(3, 81, 1); sample(3, 97, 1);
    load_coeffs(1, 2, 2, 1);
    sample(1, 1, 1); sample(2, 4, 1); sample(3, 9, 1); sample(3, 14, 1);
    for (int r = 0; r < 10; r++) begin
      load_coeffs(8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom));
      for (int i = 0; i < 50; i++) sample(8'($urandom), 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
