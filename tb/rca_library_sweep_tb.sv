// rca_library_sweep_tb: every Sum function and every Carry function of the
// approximate full adder, on the 8-bit adder with 4 approximated bits.
//
// Two families of 256 adders are built. Family S varies SUM_TT over all 256
// three-input functions with the carry fixed to a & b (8'hC0). Family C
// varies CARRY_TT over all 256 functions with the sum fixed to a | b
// (8'hFC). Together they cover both axes of the 256 x 256 function-pair
// space. 10,000 normally distributed operand pairs (mean 128, sigma 32,
// clipped) are applied with carry input 0. Each output is compared with a
// bit-serial model of the same tables, and the mean squared and mean
// absolute errors against a + b are accumulated. The test bench prints the
// most accurate member of each family, and checks three things:
//   - the OR/AND member's squared error equals the closed form
//     (a & b) mod 2^(K-1) - 2^(K-1) * (a & b)[K-1], accumulated separately;
//   - the default pair (8'hFC, 8'hC0) gives the same MSE in both families;
//   - MAE^2 <= MSE for every adder.
module rca_library_sweep_tb;
  localparam int K       = 4;
  localparam int SAMPLES = 10000;

  int checks = 0;
  int failures = 0;

  logic [7:0] a8, b8;
  logic [8:0] rs [256];
  logic [8:0] rc [256];

  for (genvar f = 0; f < 256; f++) begin : g_f
    approx_rca #(.N(8), .APPROX_BITS(K), .SUM_TT(8'(f)), .CARRY_TT(8'hC0)) u_s (
      .a(a8), .b(b8), .cin(1'b0), .sum(rs[f][7:0]), .cout(rs[f][8]));
    approx_rca #(.N(8), .APPROX_BITS(K), .SUM_TT(8'hFC), .CARRY_TT(8'(f))) u_c (
      .a(a8), .b(b8), .cin(1'b0), .sum(rc[f][7:0]), .cout(rc[f][8]));
  end

  function automatic logic [8:0] model(logic [7:0] a, logic [7:0] b,
                                       logic [7:0] stt, logic [7:0] ctt);
    logic [8:0] r;
    logic c, co;
    c = 1'b0;
    for (int i = 0; i < 8; i++) begin
      if (i < K) begin
        r[i] = stt[{a[i], b[i], c}];
        co   = ctt[{a[i], b[i], c}];
      end else begin
        r[i] = a[i] ^ b[i] ^ c;
        co   = (a[i] & b[i]) | (a[i] & c) | (b[i] & c);
      end
      c = co;
    end
    r[8] = c;
    return r;
  endfunction

  function automatic int gauss();
    int acc, v;
    acc = 0;
    for (int j = 0; j < 12; j++) acc += int'($urandom % 4096);
    v = 128 + ((acc - 24570) * 32) / 4096;
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    return v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s a=%0d b=%0d", what, a8, b8);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real sq_s [256], ab_s [256], sq_c [256], ab_c [256];
    real best_s, best_c, sq_ref;
    int  arg_s, arg_c, e, ce;
    logic [7:0] andv;
    for (int f = 0; f < 256; f++) begin
      sq_s[f] = 0.0; ab_s[f] = 0.0; sq_c[f] = 0.0; ab_c[f] = 0.0;
    end
    sq_ref = 0.0;
    for (int s = 0; s < SAMPLES; s++) begin
      a8 = 8'(gauss());
      b8 = 8'(gauss());
      #1;
      andv = a8 & b8;
      ce = int'(andv & 8'((1 << (K - 1)) - 1)) - (int'(andv[K-1]) << (K - 1));
      sq_ref += real'(ce * ce);
      for (int f = 0; f < 256; f++) begin
        check(rs[f] == model(a8, b8, 8'(f), 8'hC0), "sum family vs model");
        check(rc[f] == model(a8, b8, 8'hFC, 8'(f)), "carry family vs model");
        e = int'(a8) + int'(b8) - int'(rs[f]);
        sq_s[f] += real'(e * e);
        ab_s[f] += real'(e < 0 ? -e : e);
        e = int'(a8) + int'(b8) - int'(rc[f]);
        sq_c[f] += real'(e * e);
        ab_c[f] += real'(e < 0 ? -e : e);
      end
    end
    best_s = sq_s[0]; arg_s = 0;
    best_c = sq_c[0]; arg_c = 0;
    for (int f = 0; f < 256; f++) begin
      if (sq_s[f] < best_s) begin best_s = sq_s[f]; arg_s = f; end
      if (sq_c[f] < best_c) begin best_c = sq_c[f]; arg_c = f; end
      check((ab_s[f] / SAMPLES) ** 2 <= sq_s[f] / SAMPLES + 1e-6, "MAE^2 <= MSE (S)");
      check((ab_c[f] / SAMPLES) ** 2 <= sq_c[f] / SAMPLES + 1e-6, "MAE^2 <= MSE (C)");
    end
    $display("sum family   (carry = a & b): best SUM_TT   %02h, MSE %0.2f MAE %0.3f",
             arg_s, best_s / SAMPLES, ab_s[arg_s] / SAMPLES);
    $display("carry family (sum = a | b):   best CARRY_TT %02h, MSE %0.2f MAE %0.3f",
             arg_c, best_c / SAMPLES, ab_c[arg_c] / SAMPLES);
    check(sq_s[8'hFC] == sq_ref, "OR/AND member matches the closed-form error");
    check(sq_s[8'hFC] == sq_c[8'hC0], "default pair identical in both families");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
