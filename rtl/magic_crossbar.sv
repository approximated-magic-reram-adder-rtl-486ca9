// magic_crossbar: behavioural model of a ReRAM crossbar running MAGIC
// stateful logic.
//
// This is a behavioural model of an analog memristor array, not a circuit
// for synthesis into standard cells: each memristor is one bit (R_on = 1,
// R_off = 0), and the voltage-driven switching of a MAGIC gate is reduced
// to its logical effect.
//
// A MAGIC gate lies inside one row: its input memristors and its output
// memristor sit in different columns of that row. A gate takes two
// micro-operations, one clock cycle each:
//   XB_INIT  presets the output memristor(s) to R_on (1). The column mask
//            may select several outputs, which are preset together.
//   XB_EVAL  applies the input voltage to the columns in col_mask and
//            grounds column out_col. The output switches to R_off when at
//            least one input is R_on, and otherwise keeps its state, so an
//            initialised output ends as NOR(inputs); with a single input
//            column the gate is a NOT. An output that was not initialised
//            stays 0 whatever the inputs.
// Both operations act on every row selected in row_mask at once, which is
// the row-wise parallel execution: one micro-operation evaluates the same
// gate in all selected rows.
// XB_WRITE loads operand bits (wr_data, one per row) into column out_col of
// the selected rows; rd_data returns column rd_col of every row,
// combinationally. cycles counts the INIT and EVAL cycles since reset, the
// latency measure "total cycles (Init+Eva)".
//
// From the source: R_on = 1 / R_off = 0, the two-phase NOT/NOR operation,
// NOT and 2-input NOR (MAX_FANIN = 2) and row-wise parallel evaluation.
// This design's own: the array size (ROWS x COLS), the preset value (R_on,
// as usual for MAGIC NOR), the micro-operation encoding, the write/read
// ports, and reset clearing every memristor to R_off.
module magic_crossbar #(
  parameter int unsigned ROWS      = 8,
  parameter int unsigned COLS      = 128,
  parameter int unsigned MAX_FANIN = 2,
  localparam int unsigned COL_W    = $clog2(COLS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  magic_pkg::xb_op_e    op,
  input  logic [ROWS-1:0]      row_mask,
  input  logic [COLS-1:0]      col_mask,
  input  logic [COL_W-1:0]     out_col,
  input  logic [ROWS-1:0]      wr_data,
  input  logic [COL_W-1:0]     rd_col,
  output logic [ROWS-1:0]      rd_data,
  output logic [31:0]          cycles
);
  import magic_pkg::*;

  logic [COLS-1:0] state [ROWS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++) state[r] <= '0;
      cycles <= '0;
    end else begin
      for (int r = 0; r < ROWS; r++) begin
        if (row_mask[r]) begin
          unique case (op)
            XB_WRITE: state[r][out_col] <= wr_data[r];
            XB_INIT:  state[r] <= state[r] | col_mask;
            XB_EVAL:  state[r][out_col] <= state[r][out_col] & ~(|(state[r] & col_mask));
            default:  ;
          endcase
        end
      end
      if (op == XB_INIT || op == XB_EVAL) cycles <= cycles + 32'd1;
    end
  end

  always_comb begin
    for (int r = 0; r < ROWS; r++) rd_data[r] = state[r][rd_col];
  end

  // A MAGIC evaluation needs at least one input, at most MAX_FANIN inputs,
  // and an output column that is not one of its own inputs.
  property p_eval_legal;
    @(posedge clk) disable iff (!rst_n)
      op == XB_EVAL |-> (col_mask != '0) && ($countones(col_mask) <= MAX_FANIN)
                        && !col_mask[out_col];
  endproperty
  a_eval_legal: assert property (p_eval_legal)
    else $error("magic_crossbar: illegal MAGIC evaluation");

  initial begin
    assert (COLS >= 2 && ROWS >= 1)
      else $error("magic_crossbar: array too small");
  end

endmodule
