// tb_cmcu_program_counter: random reset, operation and load address against a
// reference model of the counter (reset to 0, hold, increment with wrap,
// load).
module tb_cmcu_program_counter;
  import fir_pkg::*;

  int checks = 0, failures = 0;
  int n_load = 0, n_inc = 0, n_hold = 0, n_wrap = 0;
  logic clk = 0, reset;
  pc_op_t op;
  logic [2:0] load_addr, pc, model;

  cmcu_program_counter dut (.clk(clk), .reset(reset), .op(op), .load_addr(load_addr), .pc(pc));

  always #5 clk = ~clk;

  initial begin
    reset = 1; op = PC_HOLD; load_addr = 0;
    @(posedge clk); #1;
    model = 0;
    for (int i = 0; i < 2000; i++) begin
      reset     = ($urandom_range(0, 49) == 0);
      case ($urandom_range(0, 5))
        0:       op = PC_LOAD;
        1:       op = PC_HOLD;
        default: op = PC_INC;
      endcase
      load_addr = 3'($urandom);
      @(posedge clk); #1;
      if (reset) model = 0;
      else if (op == PC_LOAD) begin model = load_addr; n_load++; end
      else if (op == PC_INC)  begin
        if (model == 7) n_wrap++;
        model = model + 1; n_inc++;
      end else n_hold++;
      checks++;
      if (pc !== model) begin
        failures++;
        $display("FAIL step %0d: pc %0d expected %0d", i, pc, model);
      end
    end
    if (n_load == 0 || n_inc == 0 || n_hold == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL coverage load=%0d inc=%0d hold=%0d wrap=%0d", n_load, n_inc, n_hold, n_wrap);
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
