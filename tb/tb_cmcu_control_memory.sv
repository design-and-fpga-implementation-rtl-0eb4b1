// tb_cmcu_control_memory: reads every word of the control memory and compares
// each field with the microprogram table, written here field by field.
module tb_cmcu_control_memory;
  import fir_pkg::*;

  int checks = 0, failures = 0;
  logic [2:0] addr;
  uinstr_t    u;

  cmcu_control_memory dut (.addr(addr), .uinstr(u));

  // Expected columns, index = address: Y0, Load_en, Ld_1, Ld_0, D_clear,
  // D_load, D_move, YL.
  localparam bit EXP_Y0 [8] = '{0,0,0,0,0,0,1,1};
  localparam bit EXP_LE [8] = '{1,1,1,1,0,0,0,0};
  localparam bit EXP_L1 [8] = '{0,0,1,1,0,0,0,0};
  localparam bit EXP_L0 [8] = '{0,1,0,1,0,0,0,0};
  localparam bit EXP_DC [8] = '{0,0,0,1,0,0,0,0};
  localparam bit EXP_DL [8] = '{0,0,0,0,1,0,0,0};
  localparam bit EXP_DM [8] = '{0,0,0,0,0,1,0,0};
  localparam bit EXP_YL [8] = '{0,0,0,0,0,0,1,0};

  task automatic chk(input bit got, input bit exp, input string what, input int a);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL addr %0d %s: got %0b expected %0b", a, what, got, exp);
    end
  endtask

  initial begin
    for (int a = 0; a < 8; a++) begin
      addr = 3'(a);
      #1;
      chk(u.y0,           EXP_Y0[a], "Y0", a);
      chk(u.ctrl.load_en, EXP_LE[a], "Load_en", a);
      chk(u.ctrl.ld1,     EXP_L1[a], "Ld_1", a);
      chk(u.ctrl.ld0,     EXP_L0[a], "Ld_0", a);
      chk(u.ctrl.d_clear, EXP_DC[a], "D_clear", a);
      chk(u.ctrl.d_load,  EXP_DL[a], "D_load", a);
      chk(u.ctrl.d_move,  EXP_DM[a], "D_move", a);
      chk(u.ctrl.yl,      EXP_YL[a], "YL", a);
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
