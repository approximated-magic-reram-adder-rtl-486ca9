// approx_fa: one-bit full adder with freely chosen Sum and Carry functions.
//
// Functional approximation replaces the Boolean functions of an exact full
// adder with other three-input functions. Each output is therefore described
// by an 8-bit truth table: sum = SUM_TT[{a, b, cin}] and
// cout = CARRY_TT[{a, b, cin}]. With 256 choices per output there are
// 256 x 256 = 65,536 full-adder variants; SUM_TT = 8'h96 and CARRY_TT = 8'hE8
// give the exact full adder, which is the default here.
//
// Interface: three one-bit inputs, two one-bit outputs. Purely
// combinational, no clock. The truth-table encoding (bit index {a, b, cin})
// is this design's choice; the function space is the one the approximation
// method explores.
module approx_fa #(
  parameter logic [7:0] SUM_TT   = magic_pkg::FA_SUM_EXACT,
  parameter logic [7:0] CARRY_TT = magic_pkg::FA_CARRY_EXACT
) (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic [2:0] idx;

  always_comb begin
    idx  = {a, b, cin};
    sum  = SUM_TT[idx];
    cout = CARRY_TT[idx];
  end

endmodule
