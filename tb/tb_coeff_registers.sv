// tb_coeff_registers: random one-hot and multi-bit load patterns against a
// model of the four coefficient registers.
module tb_coeff_registers;
  int checks = 0, failures = 0;
  logic clk = 0, reset;
  logic [3:0] load;
  logic [7:0] coeff_in;
  logic [3:0][7:0] w;
  logic [7:0] model [4];

  coeff_registers dut (.clk(clk), .reset(reset), .load(load), .coeff_in(coeff_in), .w(w));

  always #5 clk = ~clk;

  initial begin
    reset = 1; load = 0; coeff_in = 0;
    @(posedge clk); #1;
    reset = 0;
    for (int k = 0; k < 4; k++) model[k] = 0;
    for (int i = 0; i < 500; i++) begin
      load     = ($urandom_range(0, 1) == 0) ? 4'(1 << $urandom_range(0, 3)) : 4'($urandom);
      coeff_in = 8'($urandom);
      @(posedge clk); #1;
      for (int k = 0; k < 4; k++) begin
        if (load[k]) model[k] = coeff_in;
        checks++;
        if (w[k] !== model[k]) begin
          failures++;
          $display("FAIL step %0d W%0d: got %0d expected %0d", i, k, w[k], model[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
