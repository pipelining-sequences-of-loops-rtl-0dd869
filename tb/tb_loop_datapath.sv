// tb_loop_datapath: loads eight random samples through the load port in a
// random order, pulses comp_en and reads the eight results back through the
// store selector, comparing each with the reference DCT. Also checks that
// the results hold while new samples are loaded (F registers change only on
// comp_en).
module tb_loop_datapath;
  import lp_pkg::*;
  import tb_dct_ref::*;

  logic    clk = 1'b0;
  logic    ld_en = 1'b0, comp_en = 1'b0;
  idx_t    ld_idx = '0, st_idx = '0;
  sample_t ld_data = '0, st_data;
  int checks = 0, failures = 0;

  loop_datapath dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shortint x[8];
    int order[8];
    repeat (200) begin
      foreach (x[n]) x[n] = shortint'($signed(12'($urandom)));
      foreach (order[i]) order[i] = i;
      order.shuffle();
      foreach (order[i]) begin
        @(negedge clk);
        ld_en = 1'b1; ld_idx = idx_t'(order[i]); ld_data = x[order[i]];
      end
      @(negedge clk); ld_en = 1'b0; comp_en = 1'b1;
      @(negedge clk); comp_en = 1'b0;
      // overwrite the inputs: results must not move
      ld_en = 1'b1; ld_idx = 3'd0; ld_data = 16'h1234;
      @(negedge clk); ld_en = 1'b0;
      for (int k = 0; k < 8; k++) begin
        st_idx = idx_t'(k);
        #1;
        checks++;
        if ($signed(st_data) !== dct_point(x, k)) begin
          failures++;
          $display("FAIL k=%0d got %0d exp %0d", k, $signed(st_data), dct_point(x, k));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
