// dct8_kernel: 8-point DCT of one row or column (combinational).
//
// Computes F[k] = sum_n f[n] * cos((2n+1)k*pi/16) in fixed point.
// F0 and F4 are formed from additions and subtractions only and are not
// shifted; F1, F2, F3, F5, F6 and F7 use 13-bit-fraction coefficients and
// are shifted right arithmetically by 13 - this follows the stores of the
// column pass, where F0 and F4 are stored as they are and the other six
// results are stored ">> 13". The coefficient values and the plain
// sum-of-products structure are this design's own (the butterfly network of
// the original fast algorithm is not reproduced); any 8-point DCT with the
// same output scaling can replace it. Note that F4 so formed is sqrt(2)
// times the plain DCT value (the cos(pi/4) factor is left out, as it is
// for F0 where it is 1). Results are truncated to 16 bits like
// an assignment to a C short.
//
// Interface: f (8 x 16-bit signed samples, f[0] in bits 15:0) in,
// F (8 x 16-bit results) out. No clock; one multiply-accumulate tree per
// output.
module dct8_kernel
  import lp_pkg::*;
(
  input  vec8_t f,
  output vec8_t F
);

  localparam int unsigned ACC_W = DATA_W + 18;  // 16b x 14b products, 8 terms

  typedef logic signed [ACC_W-1:0] acc_t;

  // term[k][n]: contribution of f[n] to F[k]. The coefficient is a constant
  // of each generate scope, so every product is by a fixed number.
  acc_t term [N][N];

  for (genvar k = 0; k < N; k++) begin : g_out
    for (genvar n = 0; n < N; n++) begin : g_in
      localparam int C = coef(k, n);
      if (k == 0 || k == N / 2) begin : g_add
        assign term[k][n] = (C < 0) ? -acc_t'($signed(f[n])) : acc_t'($signed(f[n]));
      end else begin : g_mul
        assign term[k][n] = acc_t'($signed(f[n])) * acc_t'(C);
      end
    end

    acc_t sum;
    always_comb begin
      sum = '0;
      for (int n = 0; n < N; n++) sum = sum + term[k][n];
    end

    if (k == 0 || k == N / 2) begin : g_plain
      assign F[k] = sum[DATA_W-1:0];
    end else begin : g_shift
      assign F[k] = DATA_W'(sum >>> FRAC);
    end
  end

endmodule
