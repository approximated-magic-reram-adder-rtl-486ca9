// approx_rca_tb: checks the approximate ripple carry adder in four builds.
//
//  u_exact  8 bits, exact tables with APPROX_BITS = 3: must equal a + b + cin.
//  u_dflt   default build (4 approximated bits, sum = a | b, carry = a & b):
//           compared with the closed form {a[7:4] + b[7:4] + (a[3] & b[3]),
//           a[3:0] | b[3:0]} (the carry input is ignored by the low bits).
//  u_asym   7 approximated bits with sum = a ^ cin, carry = b: compared with
//           a bit-serial model written from those two expressions.
//  u_wide   16 bits, 5 approximated OR/AND bits, random operands.
// The 8-bit builds are checked exhaustively for both carry inputs.
module approx_rca_tb;
  int checks = 0;
  int failures = 0;

  logic [7:0]  a8, b8;
  logic        cin;
  logic [7:0]  s_exact, s_dflt, s_asym;
  logic        c_exact, c_dflt, c_asym;
  logic [15:0] a16, b16, s_wide;
  logic        c_wide;

  approx_rca #(.N(8), .APPROX_BITS(3), .SUM_TT(8'h96), .CARRY_TT(8'hE8)) u_exact (
    .a(a8), .b(b8), .cin(cin), .sum(s_exact), .cout(c_exact));
  approx_rca u_dflt (
    .a(a8), .b(b8), .cin(cin), .sum(s_dflt), .cout(c_dflt));
  approx_rca #(.N(8), .APPROX_BITS(7), .SUM_TT(8'h5A), .CARRY_TT(8'hCC)) u_asym (
    .a(a8), .b(b8), .cin(cin), .sum(s_asym), .cout(c_asym));
  approx_rca #(.N(16), .APPROX_BITS(5), .SUM_TT(8'hFC), .CARRY_TT(8'hC0)) u_wide (
    .a(a16), .b(b16), .cin(1'b0), .sum(s_wide), .cout(c_wide));

  task automatic check(input logic [16:0] got, input logic [16:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s a=%0h b=%0h cin=%0b got=%0h exp=%0h", what, a8, b8, cin, got, exp);
    end
  endtask

  function automatic logic [8:0] asym_model(logic [7:0] a, logic [7:0] b, logic c0);
    logic [8:0] r;
    logic c;
    c = c0;
    for (int i = 0; i < 8; i++) begin
      if (i < 7) begin
        r[i] = a[i] ^ c;
        c    = b[i];
      end else begin
        r[i] = a[i] ^ b[i] ^ c;
        c    = (a[i] & b[i]) | (c & (a[i] ^ b[i]));
      end
    end
    r[8] = c;
    return r;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] hi;
    logic [16:0] w;
    for (int c = 0; c < 2; c++) begin
      for (int i = 0; i < 65536; i++) begin
        {a8, b8} = 16'(i);
        cin = 1'(c);
        #1;
        check({c_exact, s_exact}, 9'(a8) + 9'(b8) + 9'(cin), "exact");
        hi = 5'(a8[7:4]) + 5'(b8[7:4]) + 5'(a8[3] & b8[3]);
        check({c_dflt, s_dflt}, {hi, a8[3:0] | b8[3:0]}, "default");
        check({c_asym, s_asym}, asym_model(a8, b8, cin), "asym");
      end
    end
    for (int i = 0; i < 20000; i++) begin
      a16 = 16'($urandom);
      b16 = 16'($urandom);
      #1;
      w = {(17'(a16[15:5]) + 17'(b16[15:5]) + 17'(a16[4] & b16[4])), 5'(a16[4:0] | b16[4:0])};
      checks++;
      if ({c_wide, s_wide} !== w) begin
        failures++;
        $display("FAIL wide a=%0h b=%0h got=%0h exp=%0h", a16, b16, {c_wide, s_wide}, w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
