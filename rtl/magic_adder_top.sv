// magic_adder_top: approximate ripple carry adder and the MAGIC crossbar it
// is mapped onto, side by side.
//
// The approximate adder (approx_rca) is the function under study: an N-bit
// ripple carry adder whose APPROX_BITS low full adders use the Sum/Carry
// truth tables SUM_TT/CARRY_TT. The crossbar (magic_crossbar) is the
// in-memory substrate that executes such an adder once it has been reduced
// to NOT/NOR gates and scheduled into INIT/EVAL micro-operations, one row
// per independent addition. The schedule itself is produced outside the
// hardware and is applied through the crossbar ports, which are brought out
// unchanged; the adder's ports give the reference result that a crossbar
// run of the same design must reproduce.
//
// Interface: add_* are the combinational adder ports; xb_* are the
// crossbar's clocked micro-operation, write and read ports (see
// magic_crossbar for their timing). Defaults: 8-bit adder, 4 approximated
// bits with sum = a | b and carry = a & b (an example design of the
// library, this design's choice), 8 x 128 crossbar (size assumed).
module magic_adder_top #(
  parameter int unsigned N           = 8,
  parameter int unsigned APPROX_BITS = 4,
  parameter logic [7:0]  SUM_TT      = magic_pkg::FA_SUM_OR,
  parameter logic [7:0]  CARRY_TT    = magic_pkg::FA_CARRY_AND,
  parameter int unsigned ROWS        = 8,
  parameter int unsigned COLS        = 128,
  parameter int unsigned MAX_FANIN   = 2,
  localparam int unsigned COL_W      = $clog2(COLS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // approximate adder
  input  logic [N-1:0]         add_a,
  input  logic [N-1:0]         add_b,
  input  logic                 add_cin,
  output logic [N-1:0]         add_sum,
  output logic                 add_cout,
  // MAGIC crossbar
  input  magic_pkg::xb_op_e    xb_op,
  input  logic [ROWS-1:0]      xb_row_mask,
  input  logic [COLS-1:0]      xb_col_mask,
  input  logic [COL_W-1:0]     xb_out_col,
  input  logic [ROWS-1:0]      xb_wr_data,
  input  logic [COL_W-1:0]     xb_rd_col,
  output logic [ROWS-1:0]      xb_rd_data,
  output logic [31:0]          xb_cycles
);

  approx_rca #(
    .N(N), .APPROX_BITS(APPROX_BITS), .SUM_TT(SUM_TT), .CARRY_TT(CARRY_TT)
  ) u_rca (
    .a(add_a), .b(add_b), .cin(add_cin), .sum(add_sum), .cout(add_cout)
  );

  magic_crossbar #(
    .ROWS(ROWS), .COLS(COLS), .MAX_FANIN(MAX_FANIN)
  ) u_xbar (
    .clk     (clk),
    .rst_n   (rst_n),
    .op      (xb_op),
    .row_mask(xb_row_mask),
    .col_mask(xb_col_mask),
    .out_col (xb_out_col),
    .wr_data (xb_wr_data),
    .rd_col  (xb_rd_col),
    .rd_data (xb_rd_data),
    .cycles  (xb_cycles)
  );

endmodule
