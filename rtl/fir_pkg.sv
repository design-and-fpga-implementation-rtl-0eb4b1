// fir_pkg: types and constants shared by the four-tap compositional
// microprogram FIR filter.
//
// The control memory word is eight bits. Bit 7 (Y0) tells the program
// counter to increment (0) or to load the branch address (1); bits 6..0 are
// the datapath control signals, in the column order of the microprogram
// table: Load_en, Ld_1, Ld_0, D_clear, D_load, D_move, YL. Data and
// coefficients are 8-bit unsigned; products and the output are 16 bits.
package fir_pkg;

  localparam int unsigned DATA_W  = 8;   // data and coefficient width
  localparam int unsigned ACC_W   = 16;  // product, adder and output width
  localparam int unsigned TAPS    = 4;   // third-order filter: four taps
  localparam int unsigned PC_W    = 3;   // program counter width
  localparam int unsigned CM_DEPTH = 8;  // control memory words

  // Datapath control signals (the 7 low bits of a microinstruction).
  typedef struct packed {
    logic load_en;  // enable of the 2-to-4 coefficient decoder
    logic ld1;      // coefficient select, high bit
    logic ld0;      // coefficient select, low bit
    logic d_clear;  // clear Xn-1..Xn-3
    logic d_load;   // load the input sample into Xn
    logic d_move;   // shift the delay line Xn -> Xn-1 -> Xn-2 -> Xn-3
    logic yl;       // latch the filter output
  } ctrl_t;

  // A full microinstruction: program-counter bit on top.
  typedef struct packed {
    logic  y0;      // 0: PC increments, 1: PC loads the branch address
    ctrl_t ctrl;
  } uinstr_t;

  // What the program counter does on the next clock.
  typedef enum logic [1:0] {
    PC_HOLD = 2'd0,  // stay (waiting for start)
    PC_INC  = 2'd1,  // go to the next microinstruction
    PC_LOAD = 2'd2   // take the branch address
  } pc_op_t;

  // Addresses of the microprogram.
  localparam logic [PC_W-1:0] ADDR_H0     = 3'd0;  // load h0; waits for start
  localparam logic [PC_W-1:0] ADDR_LOAD_X = 3'd4;  // load input; waits for start

endpackage
