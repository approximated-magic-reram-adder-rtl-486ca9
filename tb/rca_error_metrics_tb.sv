// rca_error_metrics_tb: error evaluation of a sample of the approximate
// adder library on a normally distributed input trace.
//
// Builds approx_rca for 8 Sum/Carry function pairs x APPROX_BITS = 1..7
// (56 adders of 8 bits) plus one 16-bit adder with 8 approximated OR/AND
// bits. 10,000 operand pairs are drawn from a normal distribution (mean
// 2^(N-1), standard deviation 2^(N-3), clipped to the operand range; the
// Gaussian is made as the sum of 12 uniform variables) and fed to every
// adder with carry input 0. For each adder the error against the exact sum
// a + b is accumulated into the mean squared error (MSE) and the mean
// absolute error (MAE), which are printed as a table.
//
// Checks: every output is compared with a bit-serial model of the same
// function pair written in this file; for the OR/AND pair the error must
// also equal the closed form (a & b mod 2^(k-1)) - 2^(k-1) * (a & b)[k-1];
// the exact pair must have zero error; and MAE^2 <= MSE must hold.
module rca_error_metrics_tb;
  localparam int NPAIR   = 8;
  localparam int SAMPLES = 10000;
  localparam logic [7:0] STT [NPAIR] = '{8'h96, 8'hFC, 8'h5A, 8'hAA, 8'hF0, 8'h96, 8'h66, 8'hFE};
  localparam logic [7:0] CTT [NPAIR] = '{8'hE8, 8'hC0, 8'hCC, 8'hC0, 8'hF0, 8'hC0, 8'h88, 8'hE8};

  int checks = 0;
  int failures = 0;

  logic [7:0]  a8, b8;
  logic [8:0]  res [NPAIR][1:7];
  logic [15:0] a16, b16, s16;
  logic        c16;

  for (genvar p = 0; p < NPAIR; p++) begin : g_pair
    for (genvar k = 1; k <= 7; k++) begin : g_k
      approx_rca #(.N(8), .APPROX_BITS(k), .SUM_TT(STT[p]), .CARRY_TT(CTT[p])) u_rca (
        .a(a8), .b(b8), .cin(1'b0), .sum(res[p][k][7:0]), .cout(res[p][k][8]));
    end
  end

  approx_rca #(.N(16), .APPROX_BITS(8), .SUM_TT(8'hFC), .CARRY_TT(8'hC0)) u_rca16 (
    .a(a16), .b(b16), .cin(1'b0), .sum(s16), .cout(c16));

  function automatic logic [16:0] model(logic [15:0] a, logic [15:0] b, int n, int k,
                                        logic [7:0] stt, logic [7:0] ctt);
    logic [16:0] r;
    logic c, s, co;
    r = '0;
    c = 1'b0;
    for (int i = 0; i < n; i++) begin
      if (i < k) begin
        s  = stt[{a[i], b[i], c}];
        co = ctt[{a[i], b[i], c}];
      end else begin
        s  = a[i] ^ b[i] ^ c;
        co = (a[i] & b[i]) | (a[i] & c) | (b[i] & c);
      end
      r[i] = s;
      c = co;
    end
    r[n] = c;
    return r;
  endfunction

  function automatic int gauss(int n);
    int acc, v, mean, sd;
    acc = 0;
    for (int j = 0; j < 12; j++) acc += int'($urandom % 4096);
    mean = 1 << (n - 1);
    sd   = 1 << (n - 3);
    v = mean + ((acc - 24570) * sd) / 4096;
    if (v < 0) v = 0;
    if (v > (1 << n) - 1) v = (1 << n) - 1;
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
    real    sq [NPAIR][1:7], ab [NPAIR][1:7];
    real    sq16, ab16, mse, mae;
    longint e;
    int     ce;
    logic [7:0] andv;
    for (int p = 0; p < NPAIR; p++)
      for (int k = 1; k <= 7; k++) begin sq[p][k] = 0.0; ab[p][k] = 0.0; end
    sq16 = 0.0; ab16 = 0.0;

    for (int s = 0; s < SAMPLES; s++) begin
      a8  = 8'(gauss(8));
      b8  = 8'(gauss(8));
      a16 = 16'(gauss(16));
      b16 = 16'(gauss(16));
      #1;
      for (int p = 0; p < NPAIR; p++) begin
        for (int k = 1; k <= 7; k++) begin
          check(17'(res[p][k]) == model(16'(a8), 16'(b8), 8, k, STT[p], CTT[p]), "model");
          e = longint'(a8) + longint'(b8) - longint'(res[p][k]);
          sq[p][k] += real'(e * e);
          ab[p][k] += real'(e < 0 ? -e : e);
          if (p == 1) begin
            andv = a8 & b8;
            ce = int'(andv & 8'((1 << (k - 1)) - 1)) - (int'(andv[k-1]) << (k - 1));
            check(e == longint'(ce), "OR/AND closed form");
          end
          if (p == 0) check(e == 0, "exact pair");
        end
      end
      check({c16, s16} == model(a16, b16, 16, 8, 8'hFC, 8'hC0), "16-bit model");
      e = longint'(a16) + longint'(b16) - longint'({c16, s16});
      sq16 += real'(e * e);
      ab16 += real'(e < 0 ? -e : e);
    end

    $display("pair  SUM_TT CARRY_TT  k      MSE        MAE");
    for (int p = 0; p < NPAIR; p++) begin
      for (int k = 1; k <= 7; k++) begin
        mse = sq[p][k] / SAMPLES;
        mae = ab[p][k] / SAMPLES;
        $display("%4d  %02h     %02h        %0d  %10.2f %10.3f", p, STT[p], CTT[p], k, mse, mae);
        check(mae * mae <= mse + 1e-6, "MAE^2 <= MSE");
      end
    end
    $display("16-bit, 8 OR/AND bits: MSE %0.2f MAE %0.3f", sq16 / SAMPLES, ab16 / SAMPLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
