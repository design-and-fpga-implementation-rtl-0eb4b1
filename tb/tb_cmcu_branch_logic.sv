// tb_cmcu_branch_logic: every combination of reset, start, Y0 and address
// against the expected counter operation (load 0 on reset, load 4 on Y0,
// hold at addresses 0 and 4 without start, increment otherwise).
module tb_cmcu_branch_logic;
  import fir_pkg::*;

  int checks = 0, failures = 0;
  logic reset, start, y0;
  logic [2:0] pc, ba;
  pc_op_t op, exp_op;
  logic [2:0] exp_ba;

  cmcu_branch_logic dut (.reset(reset), .start(start), .y0(y0), .pc(pc), .op(op), .branch_addr(ba));

  initial begin
    for (int i = 0; i < 64; i++) begin
      {reset, start, y0, pc} = 6'(i);
      #1;
      if (reset)                          begin exp_op = PC_LOAD; exp_ba = 3'd0; end
      else if (y0)                        begin exp_op = PC_LOAD; exp_ba = 3'd4; end
      else if (!start && (pc == 0 || pc == 4)) begin exp_op = PC_HOLD; exp_ba = 'x; end
      else                                begin exp_op = PC_INC;  exp_ba = 'x; end
      checks++;
      if (op !== exp_op || (exp_op == PC_LOAD && ba !== exp_ba)) begin
        failures++;
        $display("FAIL reset=%0b start=%0b y0=%0b pc=%0d: op %0d addr %0d, expected op %0d addr %0d",
                 reset, start, y0, pc, op, ba, exp_op, exp_ba);
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
