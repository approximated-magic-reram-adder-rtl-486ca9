// magic_crossbar_tb: checks the MAGIC crossbar model micro-operation by
// micro-operation.
//
// A small 4 x 16 array is used. Each trial writes random operand bits into
// columns 0 and 1 of every row, then:
//   - presets columns 2, 3 and 4 of all rows in one INIT;
//   - evaluates NOR(c0, c1) -> c2 in all rows at once (row-parallel);
//   - evaluates NOT(c0) -> c3 in a random subset of rows only;
//   - evaluates NOR(c0, c1) -> c5, a column that was never preset, which
//     must stay at R_off (0) whatever the inputs;
//   - chains a second level, NOR(c2, c3) -> c4.
// Expected values come from Boolean expressions on the operands the test
// bench wrote. The INIT+EVAL cycle counter is checked against the number of
// such operations issued.
module magic_crossbar_tb;
  import magic_pkg::*;

  localparam int ROWS = 4;
  localparam int COLS = 16;

  int checks = 0;
  int failures = 0;
  int ops = 0;

  logic              clk = 0;
  logic              rst_n = 0;
  xb_op_e            op = XB_NOP;
  logic [ROWS-1:0]   row_mask = '0;
  logic [COLS-1:0]   col_mask = '0;
  logic [3:0]        out_col = '0;
  logic [ROWS-1:0]   wr_data = '0;
  logic [3:0]        rd_col = '0;
  logic [ROWS-1:0]   rd_data;
  logic [31:0]       cycles;

  magic_crossbar #(.ROWS(ROWS), .COLS(COLS), .MAX_FANIN(2)) dut (
    .clk, .rst_n, .op, .row_mask, .col_mask, .out_col, .wr_data, .rd_col,
    .rd_data, .cycles);

  always #5 clk = ~clk;

  task automatic issue(input xb_op_e o, input logic [ROWS-1:0] rows,
                       input logic [COLS-1:0] cols, input int oc,
                       input logic [ROWS-1:0] wd);
    op = o; row_mask = rows; col_mask = cols; out_col = 4'(oc); wr_data = wd;
    @(posedge clk);
    #1;
    if (o == XB_INIT || o == XB_EVAL) ops++;
    op = XB_NOP; row_mask = '0; col_mask = '0;
  endtask

  task automatic expect_col(input int c, input logic [ROWS-1:0] exp, input string what);
    rd_col = 4'(c);
    #1;
    checks++;
    if (rd_data !== exp) begin
      failures++;
      $display("FAIL %s col=%0d got=%b exp=%b", what, c, rd_data, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [ROWS-1:0] x, y, sel, c3_prev;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // after reset every memristor is R_off
    for (int c = 0; c < COLS; c++) expect_col(c, '0, "reset");
    c3_prev = '0;
    for (int t = 0; t < 200; t++) begin
      x = ROWS'($urandom);
      y = ROWS'($urandom);
      sel = ROWS'($urandom);
      issue(XB_WRITE, '1, '0, 0, x);
      issue(XB_WRITE, '1, '0, 1, y);
      issue(XB_WRITE, '1, '0, 5, ROWS'($urandom));  // leave garbage then clear
      issue(XB_WRITE, '1, '0, 5, '0);
      expect_col(0, x, "write c0");
      expect_col(1, y, "write c1");
      // INIT of c2 in all rows, of c3 only in the rows that evaluate it,
      // c4 in all rows
      issue(XB_INIT, '1, COLS'(16'b0000_0000_0001_0100), 0, '0);
      issue(XB_INIT, sel, COLS'(16'b0000_0000_0000_1000), 0, '0);
      expect_col(2, '1, "init c2");
      expect_col(4, '1, "init c4");
      expect_col(3, sel | c3_prev, "init c3 only in selected rows");
      issue(XB_EVAL, '1, COLS'(16'b11), 2, '0);
      expect_col(2, ~(x | y), "NOR2 row-parallel");
      issue(XB_EVAL, sel, COLS'(16'b01), 3, '0);
      expect_col(3, (sel & ~x) | (~sel & c3_prev), "NOT in selected rows");
      issue(XB_EVAL, '1, COLS'(16'b11), 5, '0);
      expect_col(5, '0, "evaluation without initialisation");
      issue(XB_EVAL, '1, COLS'(16'b1100), 4, '0);
      expect_col(4, ~(~(x | y) | ((sel & ~x) | (~sel & c3_prev))), "second level NOR");
      c3_prev = (sel & ~x) | (~sel & c3_prev);
      // inputs are left unchanged by an evaluation
      expect_col(0, x, "input c0 kept");
      expect_col(1, y, "input c1 kept");
    end
    checks++;
    if (cycles != 32'(ops)) begin
      failures++;
      $display("FAIL cycle count got=%0d exp=%0d", cycles, ops);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
