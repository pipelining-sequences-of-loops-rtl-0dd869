// tb_loop12_fsm: runs FSM 1 for three blocks and checks, cycle by cycle,
// the img read addresses (i_1 + 8k, column by column, i_1 advancing as in
// Loops 1,2), that each read is captured by the datapath one cycle later
// with the right index, one compute per column after the eighth capture,
// the tmp/tab store addresses and result selectors, and the run length of
// 144 cycles per block from start to the done pulse. A second run checks
// that the counters restart.
module tb_loop12_fsm;
  import lp_pkg::*;
  localparam int unsigned NF = 3;
  localparam int unsigned AW = $clog2(M * NF);

  logic          clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic          busy, done, img_re, ld_en, comp_en, st_we;
  logic [AW-1:0] img_raddr, st_addr;
  idx_t          ld_idx, st_idx;
  int checks = 0, failures = 0;

  loop12_fsm #(.NUM_FDCTS(NF)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_int(input int got, input int exp_v, input string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s got %0d exp %0d @%0t", what, got, exp_v, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rd_n, st_n, ld_n, comp_n, cyc, prev_rd_k, caps;
    logic prev_re;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      rd_n = 0; st_n = 0; ld_n = 0; comp_n = 0; cyc = 0; prev_re = 1'b0; prev_rd_k = 0;
      caps = 0;
      while (!done) begin
        // column c = rd_n/8 (reads) or st_n/8 (stores); element k = n%8
        if (ld_en) begin
          checks++;
          if (!prev_re || int'(ld_idx) != prev_rd_k) begin
            failures++; $display("FAIL capture idx %0d @%0t", ld_idx, $time);
          end
          ld_n++; caps++;
        end
        if (comp_en) begin
          expect_int(caps, 8, "captures before compute");
          caps = 0;
          comp_n++;
        end
        if (img_re) begin
          expect_int(int'(img_raddr),
                     (rd_n / 64) * 64 + (rd_n / 8) % 8 + 8 * (rd_n % 8), "img addr");
          prev_rd_k = rd_n % 8;
          rd_n++;
        end
        prev_re = img_re;
        if (st_we) begin
          expect_int(int'(st_addr),
                     (st_n / 64) * 64 + (st_n / 8) % 8 + 8 * (st_n % 8), "store addr");
          expect_int(int'(st_idx), st_n % 8, "store idx");
          checks++;
          if (img_re) begin failures++; $display("FAIL read during store"); end
          st_n++;
        end
        checks++;
        if (!busy) begin failures++; $display("FAIL busy low during run"); end
        @(negedge clk);
        cyc++;
      end
      expect_int(rd_n, 64 * NF, "reads");
      expect_int(ld_n, 64 * NF, "captures");
      expect_int(st_n, 64 * NF, "stores");
      expect_int(comp_n, 8 * NF, "computes");
      expect_int(cyc, 144 * NF, "cycles from start to done");
      @(negedge clk);
      expect_int(int'(busy), 0, "idle after done");
      expect_int(int'(done), 0, "done is a pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
