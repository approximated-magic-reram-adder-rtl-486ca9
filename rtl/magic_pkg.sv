// magic_pkg: types and constants shared by the approximate adder and the
// MAGIC crossbar model.
//
// Truth-table convention: a three-input function f(a, b, cin) is an 8-bit
// vector TT with f = TT[{a, b, cin}], so bit i of TT is the output for the
// input combination whose binary value is i (a is the most significant
// input). Each of the 2^(2^3) = 256 possible vectors is one Boolean function.
//
// Crossbar micro-operations: MAGIC executes a gate in two steps, an
// initialisation that presets the output memristor and an evaluation that
// applies the input voltages. Writing and reading operands are added so that
// a crossbar can be loaded and observed; their encoding is this design's own.
package magic_pkg;

  // Exact full-adder functions in the convention above.
  localparam logic [7:0] FA_SUM_EXACT   = 8'h96;  // a ^ b ^ cin
  localparam logic [7:0] FA_CARRY_EXACT = 8'hE8;  // majority(a, b, cin)

  // Default approximation used by the top: sum = a | b, carry = a & b
  // (the carry input is ignored by both outputs).
  localparam logic [7:0] FA_SUM_OR      = 8'hFC;
  localparam logic [7:0] FA_CARRY_AND   = 8'hC0;

  typedef enum logic [1:0] {
    XB_NOP   = 2'd0,  // nothing happens
    XB_WRITE = 2'd1,  // load wr_data into column out_col of the selected rows
    XB_INIT  = 2'd2,  // preset the masked columns of the selected rows to 1 (R_on)
    XB_EVAL  = 2'd3   // NOR/NOT of the masked input columns into out_col
  } xb_op_e;

endpackage
