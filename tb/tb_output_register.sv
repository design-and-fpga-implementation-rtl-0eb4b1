// tb_output_register: random data and load against a model of the output
// latch (takes d only when load is high).
module tb_output_register;
  int checks = 0, failures = 0;
  logic clk = 0, reset, load;
  logic [15:0] d, q, model;

  output_register dut (.clk(clk), .reset(reset), .load(load), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    reset = 1; load = 0; d = 0;
    @(posedge clk); #1;
    reset = 0;
    model = 0;
    for (int i = 0; i < 500; i++) begin
      load = $urandom_range(0, 2) == 0;
      d    = 16'($urandom);
      @(posedge clk); #1;
      if (load) model = d;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL step %0d: got %0d expected %0d", i, q, model);
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
