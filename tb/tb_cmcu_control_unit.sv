// tb_cmcu_control_unit: runs the control unit with a directed start pattern
// and then random start/reset, comparing the address and all seven control
// signals with a model of the microprogram sequencer (wait at 0 for start,
// 0..3 once, then 4, 5, 6, branch to 4, wait at 4 for start).
module tb_cmcu_control_unit;
  import fir_pkg::*;

  int checks = 0, failures = 0;
  int n_wait = 0, n_branch = 0, n_idle = 0;
  logic clk = 0, reset, start;
  ctrl_t ctrl;
  logic [2:0] pc, model;

  cmcu_control_unit dut (.clk(clk), .reset(reset), .start(start), .ctrl(ctrl), .pc(pc));

  always #5 clk = ~clk;

  // Expected control word per address, {Load_en, Ld_1, Ld_0, D_clear,
  // D_load, D_move, YL}.
  function automatic logic [6:0] exp_ctrl(input logic [2:0] a);
    case (a)
      3'd0: return 7'b1000000;
      3'd1: return 7'b1010000;
      3'd2: return 7'b1100000;
      3'd3: return 7'b1111000;
      3'd4: return 7'b0000100;
      3'd5: return 7'b0000010;
      3'd6: return 7'b0000001;
      default: return 7'b0000000;
    endcase
  endfunction

  task automatic step(input logic r, input logic s);
    reset = r; start = s;
    @(posedge clk); #1;
    if (r)                      model = 0;
    else if (model == 6)        begin model = 4; n_branch++; end
    else if (model == 0 && !s)  n_idle++;
    else if (model == 4 && !s)  n_wait++;
    else                        model = model + 1;
    checks++;
    if (pc !== model || ctrl !== exp_ctrl(model)) begin
      failures++;
      $display("FAIL t=%0t pc %0d ctrl %b expected pc %0d ctrl %b", $time, pc, ctrl, model, exp_ctrl(model));
    end
  endtask

  initial begin
    model = 0;
    step(1, 0);
    step(0, 0); step(0, 0);                   // idle at address 0
    repeat (12) step(0, 1);                   // 0..3, then three loops
    repeat (3) step(0, 0);                    // wait at 4
    step(0, 1);
    for (int i = 0; i < 3000; i++)
      step($urandom_range(0, 99) == 0, $urandom_range(0, 2) != 0);
    if (n_wait == 0 || n_branch == 0 || n_idle == 0) begin
      failures++;
      $display("FAIL coverage wait=%0d branch=%0d idle=%0d", n_wait, n_branch, n_idle);
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
