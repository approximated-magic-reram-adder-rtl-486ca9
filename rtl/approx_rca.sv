// approx_rca: N-bit ripple carry adder with approximated low-order bits.
//
// The adder is a chain of N full adders, bit i taking a[i], b[i] and the
// carry of bit i-1. Approximation is applied to the least significant bits:
// the APPROX_BITS lowest full adders all use the same approximate Sum/Carry
// pair (SUM_TT, CARRY_TT, see approx_fa), and the upper N - APPROX_BITS full
// adders are exact. For N = 8, APPROX_BITS = 1..7 and the 65,536 function
// pairs give the 7 x 65,536 = 458,752 design variants of the approximate
// adder library.
//
// Interface: operands a and b, carry input cin (tie to 0 for a plain
// adder), N-bit sum and carry output cout. Purely combinational; the
// result settles after the ripple delay of N full adders.
//
// Follows the source method: N = 8, one function pair shared by all
// approximated bits, exact upper bits. This design's own choices: the
// carry input port, and the default approximation (4 low bits, sum = a | b,
// carry = a & b), picked only so that the default build is approximate.
module approx_rca #(
  parameter int unsigned N           = 8,
  parameter int unsigned APPROX_BITS = 4,
  parameter logic [7:0]  SUM_TT      = magic_pkg::FA_SUM_OR,
  parameter logic [7:0]  CARRY_TT    = magic_pkg::FA_CARRY_AND
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  initial begin
    assert (APPROX_BITS <= N)
      else $error("approx_rca: APPROX_BITS (%0d) exceeds N (%0d)", APPROX_BITS, N);
  end

  logic [N:0] carry;

  assign carry[0] = cin;
  assign cout     = carry[N];

  for (genvar i = 0; i < N; i++) begin : g_bit
    if (i < APPROX_BITS) begin : g_approx
      approx_fa #(.SUM_TT(SUM_TT), .CARRY_TT(CARRY_TT)) u_fa (
        .a(a[i]), .b(b[i]), .cin(carry[i]), .sum(sum[i]), .cout(carry[i+1])
      );
    end else begin : g_exact
      approx_fa #(.SUM_TT(magic_pkg::FA_SUM_EXACT),
                  .CARRY_TT(magic_pkg::FA_CARRY_EXACT)) u_fa (
        .a(a[i]), .b(b[i]), .cin(carry[i]), .sum(sum[i]), .cout(carry[i+1])
      );
    end
  end

endmodule
