// approx_fa_tb: exhaustive check of the configurable full adder.
//
// Three variants are built: the exact full adder (8'h96 / 8'hE8), the
// OR/AND approximation (8'hFC / 8'hC0) and an asymmetric one (sum = a ^ cin,
// carry = b, tables 8'h5A / 8'hCC) that catches any mix-up of the input
// order. Every input combination is applied and each output is compared with
// a Boolean expression written out by hand, not with the truth table.
module approx_fa_tb;
  int checks = 0;
  int failures = 0;

  logic a, b, cin;
  logic s_ex, c_ex, s_oa, c_oa, s_as, c_as;

  approx_fa #(.SUM_TT(8'h96), .CARRY_TT(8'hE8)) u_exact (
    .a(a), .b(b), .cin(cin), .sum(s_ex), .cout(c_ex));
  approx_fa #(.SUM_TT(8'hFC), .CARRY_TT(8'hC0)) u_orand (
    .a(a), .b(b), .cin(cin), .sum(s_oa), .cout(c_oa));
  approx_fa #(.SUM_TT(8'h5A), .CARRY_TT(8'hCC)) u_asym (
    .a(a), .b(b), .cin(cin), .sum(s_as), .cout(c_as));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%0b b=%0b cin=%0b got=%0b exp=%0b", what, a, b, cin, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, cin} = 3'(i);
      #1;
      check(s_ex, a ^ b ^ cin, "exact sum");
      check(c_ex, (a & b) | (a & cin) | (b & cin), "exact carry");
      check(s_oa, a | b, "or sum");
      check(c_oa, a & b, "and carry");
      check(s_as, a ^ cin, "asym sum");
      check(c_as, b, "asym carry");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
