// tb_dct8_kernel: checks the 8-point DCT kernel against the reference
// model on fixed vectors (zero, constant, single impulses, extremes of
// 9-bit pixel differences) and on random 9-bit signed inputs.
module tb_dct8_kernel;
  import lp_pkg::*;
  import tb_dct_ref::*;

  vec8_t f, F;
  int checks = 0, failures = 0;

  dct8_kernel dut (.f(f), .F(F));

  task automatic check_vec(input shortint x[8]);
    shortint exp_v;
    for (int n = 0; n < 8; n++) f[n] = x[n];
    #1;
    for (int k = 0; k < 8; k++) begin
      exp_v = dct_point(x, k);
      checks++;
      if ($signed(F[k]) !== exp_v) begin
        failures++;
        $display("FAIL k=%0d got %0d exp %0d", k, $signed(F[k]), exp_v);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shortint x[8];
    foreach (x[n]) x[n] = 0;
    check_vec(x);
    foreach (x[n]) x[n] = 100;
    check_vec(x);
    // constant input: only F0 may be non-zero
    checks++;
    if ($signed(F[0]) != 800) failures++;
    for (int i = 0; i < 8; i++) begin
      foreach (x[n]) x[n] = (n == i) ? 255 : 0;
      check_vec(x);
      foreach (x[n]) x[n] = (n == i) ? -256 : 0;
      check_vec(x);
    end
    foreach (x[n]) x[n] = (n % 2 == 0) ? 255 : -256;
    check_vec(x);
    repeat (500) begin
      foreach (x[n]) x[n] = shortint'($signed(9'($urandom)));
      check_vec(x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
