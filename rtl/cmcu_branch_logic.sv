// cmcu_branch_logic: the combinational circuit of the control unit. Each
// clock it tells the program counter whether to increment, to load a branch
// address or to hold, and gives that address.
//
// The published design says that this circuit sees reset and start, that it
// handles the branching that lets the unit capture each new sample, and
// that bit Y0 of a microinstruction makes the counter load instead of
// increment. The rule below is this design's choice:
//   reset                      -> load address 0 (restart the microprogram)
//   Y0 = 1 (latch output)      -> load address 4 (load input data)
//   start low at address 0     -> hold (idle before the run)
//   start low at address 4     -> hold (no new sample yet)
//   otherwise                  -> increment
// So start acts as "go" at address 0 and as "sample valid" at address 4.
// Waiting on these two steps is harmless: they only reload h0 or Xn, which
// are loaded again when start comes. Held high, start gives one sample every
// three clocks.
//
// Interface: reset, start, y0, pc in; op (pc_op_t) and branch_addr out.
// Purely combinational.
module cmcu_branch_logic
  import fir_pkg::*;
(
  input  logic            reset,
  input  logic            start,
  input  logic            y0,
  input  logic [PC_W-1:0] pc,
  output pc_op_t          op,
  output logic [PC_W-1:0] branch_addr
);

  always_comb begin
    branch_addr = ADDR_LOAD_X;
    if (reset) begin
      op          = PC_LOAD;
      branch_addr = ADDR_H0;
    end else if (y0) begin
      op = PC_LOAD;
    end else if (!start && (pc == ADDR_H0 || pc == ADDR_LOAD_X)) begin
      op = PC_HOLD;
    end else begin
      op = PC_INC;
    end
  end

endmodule
