// tb_data_registers: random load/move/clear commands against a model of the
// delay line Xn, Xn-1, Xn-2, Xn-3 (clear wins over move, Xn is not cleared).
module tb_data_registers;
  int checks = 0, failures = 0;
  logic clk = 0, reset, d_load, d_move, d_clear;
  logic [7:0] x_in;
  logic [3:0][7:0] x;
  logic [7:0] model [4];
  logic [7:0] old [4];

  data_registers dut (.clk(clk), .reset(reset), .d_load(d_load), .d_move(d_move),
                      .d_clear(d_clear), .x_in(x_in), .x(x));

  always #5 clk = ~clk;

  initial begin
    reset = 1; d_load = 0; d_move = 0; d_clear = 0; x_in = 0;
    @(posedge clk); #1;
    reset = 0;
    for (int k = 0; k < 4; k++) model[k] = 0;
    for (int i = 0; i < 1000; i++) begin
      d_load  = $urandom_range(0, 1) == 1;
      d_move  = $urandom_range(0, 1) == 1;
      d_clear = $urandom_range(0, 9) == 0;
      x_in    = 8'($urandom);
      @(posedge clk); #1;
      old = model;
      if (d_load) model[0] = x_in;
      for (int k = 1; k < 4; k++)
        if (d_clear)     model[k] = 0;
        else if (d_move) model[k] = old[k-1];
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (x[k] !== model[k]) begin
          failures++;
          $display("FAIL step %0d X(n-%0d): got %0d expected %0d", i, k, x[k], model[k]);
        end
      end
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
