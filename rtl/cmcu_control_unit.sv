// cmcu_control_unit: compositional microprogram control unit of the FIR
// filter: combinational branch circuit, 3-bit program counter and 8x8
// control memory, joined as in the published block diagram.
//
// The program counter addresses the control memory; the memory's seven low
// bits are the datapath control signals and its top bit (Y0) makes the
// counter load the branch address instead of incrementing. After reset and
// start the unit runs microinstructions 0..3 once (load the four
// coefficients, clear the data registers), then loops 4 -> 5 -> 6 (load
// sample, move data, latch output), one microinstruction per clock, branching
// from 6 back to 4. It waits at address 0 until start and at address 4 until
// the next start (a sample is present); those waits are this design's
// choice.
//
// Interface: clk, reset (synchronous, active high), start in; ctrl (datapath
// control signals, combinational from the registered pc) and pc out.
module cmcu_control_unit
  import fir_pkg::*;
(
  input  logic            clk,
  input  logic            reset,
  input  logic            start,
  output ctrl_t           ctrl,
  output logic [PC_W-1:0] pc
);

  logic [PC_W-1:0] branch_addr;
  pc_op_t          op;
  uinstr_t         uinstr;

  cmcu_branch_logic u_branch (
    .reset       (reset),
    .start       (start),
    .y0          (uinstr.y0),
    .pc          (pc),
    .op          (op),
    .branch_addr (branch_addr)
  );

  cmcu_program_counter u_pc (
    .clk       (clk),
    .reset     (reset),
    .op        (op),
    .load_addr (branch_addr),
    .pc        (pc)
  );

  cmcu_control_memory u_cm (
    .addr   (pc),
    .uinstr (uinstr)
  );

  assign ctrl = uinstr.ctrl;

endmodule
