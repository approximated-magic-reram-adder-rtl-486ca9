// magic_adder_top_tb: end-to-end run of the default design.
//
// The top is built with its default parameters: 8-bit adder, 4 approximated
// bits (sum = a | b, carry = a & b), 8 x 128 crossbar. The test bench acts
// as the external micro-operation source: it maps the same approximate
// adder onto the crossbar with 2-input NOR and NOT gates, one independent
// addition per row, so all 8 rows compute in parallel.
//
// Gate mapping per bit (A, B operand columns, C incoming carry column):
//   approximated bit: g = NOR(A,B); sum = NOT(g); na = NOT(A); nb = NOT(B);
//                     cout = NOR(na, nb)                      (5 gates)
//   exact bit:        n1 = NOR(A,B); n2 = NOR(A,n1); n3 = NOR(B,n1);
//                     n4 = NOR(n2,n3) (= XNOR(A,B)); n5 = NOR(n4,C);
//                     n6 = NOR(n4,n5); n7 = NOR(C,n5);
//                     sum = NOR(n6,n7); cout = NOR(n1,n5)     (9 gates)
// Columns 0-7 hold a, 8-15 hold b, 16 holds cin, gate outputs follow.
// One INIT presets every gate output, then each gate is one EVAL, so a
// complete addition takes 1 + 4*5 + 4*9 = 57 INIT+EVAL cycles; the test
// bench checks that count on the crossbar's cycle counter.
//
// For every row the crossbar result is compared with the adder (driven with
// that row's operands) and with the closed form of the default design,
// {a[7:4] + b[7:4] + (a[3] & b[3]), a[3:0] | b[3:0]}. It counts how often
// each mechanism occurred and fails if one never did: row-parallel
// evaluation, MAGIC NOT, MAGIC NOR, multi-column INIT, an approximation
// error, an approximate carry entering the exact bits, and a carry input
// that the approximated bits ignore.
module magic_adder_top_tb;
  import magic_pkg::*;

  localparam int N       = 8;
  localparam int K       = 4;      // approximated bits of the default build
  localparam int ROWS    = 8;
  localparam int COLS    = 128;
  localparam int OPS     = 64;     // additions per row
  localparam int EXP_CYC = 1 + K * 5 + (N - K) * 9;

  int checks = 0;
  int failures = 0;
  int n_rowpar = 0, n_not = 0, n_nor = 0, n_init = 0;
  int n_err = 0, n_carry_in_exact = 0, n_cin_ignored = 0;

  logic              clk = 0;
  logic              rst_n = 0;
  logic [N-1:0]      add_a = '0, add_b = '0;
  logic              add_cin = 0;
  logic [N-1:0]      add_sum;
  logic              add_cout;
  xb_op_e            xb_op = XB_NOP;
  logic [ROWS-1:0]   xb_row_mask = '0;
  logic [COLS-1:0]   xb_col_mask = '0;
  logic [6:0]        xb_out_col = '0;
  logic [ROWS-1:0]   xb_wr_data = '0;
  logic [6:0]        xb_rd_col = '0;
  logic [ROWS-1:0]   xb_rd_data;
  logic [31:0]       xb_cycles;

  magic_adder_top dut (
    .clk, .rst_n, .add_a, .add_b, .add_cin, .add_sum, .add_cout,
    .xb_op, .xb_row_mask, .xb_col_mask, .xb_out_col, .xb_wr_data,
    .xb_rd_col, .xb_rd_data, .xb_cycles);

  always #5 clk = ~clk;

  // gate list built once: output column and its one or two input columns
  typedef struct {
    int out;
    int in0;
    int in1;   // -1 for a NOT
  } gate_t;

  gate_t gates[$];
  int    sum_col[N];
  int    cout_col;
  int    next_col;

  function automatic int add_gate(int in0, int in1);
    gate_t g;
    g.out = next_col;
    g.in0 = in0;
    g.in1 = in1;
    gates.push_back(g);
    next_col++;
    return g.out;
  endfunction

  task automatic build_program();
    int carry, g, na, nb, n1, n2, n3, n4, n5, n6, n7;
    next_col = 17;
    carry = 16;
    for (int i = 0; i < N; i++) begin
      if (i < K) begin
        g          = add_gate(i, 8 + i);
        sum_col[i] = add_gate(g, -1);
        na         = add_gate(i, -1);
        nb         = add_gate(8 + i, -1);
        carry      = add_gate(na, nb);
      end else begin
        n1 = add_gate(i, 8 + i);
        n2 = add_gate(i, n1);
        n3 = add_gate(8 + i, n1);
        n4 = add_gate(n2, n3);
        n5 = add_gate(n4, carry);
        n6 = add_gate(n4, n5);
        n7 = add_gate(carry, n5);
        sum_col[i] = add_gate(n6, n7);
        carry      = add_gate(n1, n5);
      end
    end
    cout_col = carry;
  endtask

  task automatic issue(input xb_op_e o, input logic [ROWS-1:0] rows,
                       input logic [COLS-1:0] cols, input int oc,
                       input logic [ROWS-1:0] wd);
    xb_op = o; xb_row_mask = rows; xb_col_mask = cols; xb_out_col = 7'(oc);
    xb_wr_data = wd;
    @(posedge clk);
    #1;
    xb_op = XB_NOP; xb_row_mask = '0; xb_col_mask = '0;
  endtask

  task automatic check(input logic [N:0] got, input logic [N:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%0h exp=%0h", what, got, exp);
    end
  endtask

  task automatic mech(input int n, input string what);
    checks++;
    $display("mechanism %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never occurred: %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0]    a[ROWS], b[ROWS];
    logic            ci[ROWS];
    logic [N:0]      xb_res[ROWS];
    logic [ROWS-1:0] col;
    logic [COLS-1:0] init_mask;
    logic [N:0]      ref_v;
    int              c0;

    build_program();
    init_mask = '0;
    foreach (gates[j]) init_mask[gates[j].out] = 1'b1;
    if (next_col > COLS) $fatal(1, "program does not fit the crossbar");

    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    for (int t = 0; t < OPS; t++) begin
      for (int r = 0; r < ROWS; r++) begin
        a[r]  = N'($urandom);
        b[r]  = N'($urandom);
        ci[r] = 1'($urandom);
      end
      // load operands, one column (bit position) at a time for all rows
      for (int i = 0; i < N; i++) begin
        for (int r = 0; r < ROWS; r++) col[r] = a[r][i];
        issue(XB_WRITE, '1, '0, i, col);
        for (int r = 0; r < ROWS; r++) col[r] = b[r][i];
        issue(XB_WRITE, '1, '0, 8 + i, col);
      end
      for (int r = 0; r < ROWS; r++) col[r] = ci[r];
      issue(XB_WRITE, '1, '0, 16, col);

      c0 = int'(xb_cycles);
      issue(XB_INIT, '1, init_mask, 0, '0);
      n_init++;
      foreach (gates[j]) begin
        logic [COLS-1:0] m;
        m = '0;
        m[gates[j].in0] = 1'b1;
        if (gates[j].in1 >= 0) begin
          m[gates[j].in1] = 1'b1;
          n_nor++;
        end else begin
          n_not++;
        end
        issue(XB_EVAL, '1, m, gates[j].out, '0);
        n_rowpar++;
      end
      checks++;
      if (int'(xb_cycles) - c0 != EXP_CYC) begin
        failures++;
        $display("FAIL latency %0d cycles, expected %0d", int'(xb_cycles) - c0, EXP_CYC);
      end

      // read the result of every row
      for (int i = 0; i < N; i++) begin
        xb_rd_col = 7'(sum_col[i]);
        #1;
        for (int r = 0; r < ROWS; r++) xb_res[r][i] = xb_rd_data[r];
      end
      xb_rd_col = 7'(cout_col);
      #1;
      for (int r = 0; r < ROWS; r++) xb_res[r][N] = xb_rd_data[r];

      for (int r = 0; r < ROWS; r++) begin
        add_a = a[r]; add_b = b[r]; add_cin = ci[r];
        #1;
        ref_v = {5'(a[r][7:4]) + 5'(b[r][7:4]) + 5'(a[r][3] & b[r][3]),
                 a[r][3:0] | b[r][3:0]};
        check({add_cout, add_sum}, ref_v, "adder vs closed form");
        check(xb_res[r], ref_v, "crossbar vs closed form");
        if (ref_v != 9'(a[r]) + 9'(b[r]) + 9'(ci[r])) n_err++;
        if (a[r][3] & b[r][3]) n_carry_in_exact++;
        if (ci[r]) n_cin_ignored++;
      end
    end

    mech(n_rowpar, "row-parallel evaluation");
    mech(n_not, "MAGIC NOT");
    mech(n_nor, "MAGIC NOR");
    mech(n_init, "multi-column INIT");
    mech(n_err, "approximation error");
    mech(n_carry_in_exact, "approx carry into exact bits");
    mech(n_cin_ignored, "carry input ignored");
    $display("cycles per addition (INIT+EVAL) %0d, memristors used per row %0d",
             EXP_CYC, next_col);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
