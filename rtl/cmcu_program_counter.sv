// cmcu_program_counter: the 3-bit program counter that addresses the control
// memory, with its incrementer and load path.
//
// Each clock it increments, loads load_addr or holds, as op says (op comes
// from the combinational branch circuit, which follows bit Y0 of the
// microinstruction). The counter width and the increment/load behaviour are
// the published design's; the hold and the synchronous, active-high reset to
// address 0 are this design's choices.
//
// Interface: clk, reset, op, load_addr in; pc out (registered).
module cmcu_program_counter
  import fir_pkg::*;
(
  input  logic            clk,
  input  logic            reset,
  input  pc_op_t          op,
  input  logic [PC_W-1:0] load_addr,
  output logic [PC_W-1:0] pc
);

  always_ff @(posedge clk) begin
    if (reset) begin
      pc <= ADDR_H0;
    end else begin
      unique case (op)
        PC_INC:  pc <= pc + 1'b1;
        PC_LOAD: pc <= load_addr;
        default: pc <= pc;
      endcase
    end
  end

endmodule
