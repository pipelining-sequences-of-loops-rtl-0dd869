// tb_loop3_fsm: runs FSM 2 for two blocks (16 rows) against a model of the
// tmp memory and ready table. In the first run the elements become ready
// one by one in a random order (out of order with respect to the row-wise
// loads), so FSM 2 has to wait; the testbench checks that an element is
// taken only in the cycle its flag comes back set, that the elements are
// taken in row order i_1+0..i_1+7 with the right datapath index, that the
// stall output marks exactly the cycles spent waiting, one compute per row,
// the dct_o store addresses, and that a run lasts 144 cycles per block plus
// one cycle per stall. The second run has every flag set from the start and
// must take exactly 144 cycles per block with no stall.
module tb_loop3_fsm;
  import lp_pkg::*;
  localparam int unsigned NF = 2;
  localparam int unsigned SZ = M * NF;
  localparam int unsigned AW = $clog2(SZ);

  logic          clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic          busy, done, rd_re, rd_ready, ld_en, comp_en, st_we, stall;
  logic [AW-1:0] rd_addr, st_addr, last_rd_addr;
  idx_t          ld_idx, st_idx;
  logic          produced [SZ];
  logic          produce_en = 1'b0;
  int            order [SZ];
  int            next_prod = 0;
  int checks = 0, failures = 0;

  loop3_fsm #(.NUM_FDCTS(NF)) dut (.*);

  always #5 clk = ~clk;

  // tmp/tab model: read-first, flag and data from the same cycle
  always @(posedge clk) begin
    if (rd_re) begin
      rd_ready     <= produced[rd_addr];
      last_rd_addr <= rd_addr;
    end
    if (produce_en && next_prod < SZ && $urandom_range(2) == 0) begin
      produced[order[next_prod]] <= 1'b1;
      next_prod <= next_prod + 1;
    end
  end

  task automatic expect_int(input int got, input int exp_v, input string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s got %0d exp %0d @%0t", what, got, exp_v, $time);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int acc_n, st_n, comp_n, cyc, stalls, prev_pend_fail, caps;
    logic prev_re;
    foreach (produced[a]) produced[a] = 1'b0;
    foreach (order[a]) order[a] = a;
    order.shuffle();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      @(negedge clk); start = 1'b1; produce_en = 1'b1;
      @(negedge clk); start = 1'b0;
      acc_n = 0; st_n = 0; comp_n = 0; cyc = 0; stalls = 0; prev_re = 1'b0; caps = 0;
      prev_pend_fail = 0;
      while (!done) begin
        if (prev_re && !rd_ready) prev_pend_fail++;
        if (ld_en) begin
          expect_int(int'(rd_ready), 1, "taken only when ready");
          expect_int(int'(last_rd_addr), acc_n, "address of taken element");
          expect_int(int'(ld_idx), acc_n % 8, "load index");
          acc_n++; caps++;
        end
        if (stall) stalls++;
        if (comp_en) begin
          expect_int(caps, 8, "loads before compute");
          caps = 0; comp_n++;
        end
        if (st_we) begin
          expect_int(int'(st_addr), st_n, "dct_o addr");
          expect_int(int'(st_idx), st_n % 8, "store idx");
          st_n++;
        end
        prev_re = rd_re;
        @(negedge clk);
        cyc++;
      end
      expect_int(stalls, prev_pend_fail, "stall output");
      expect_int(acc_n, SZ, "loads");
      expect_int(st_n, SZ, "stores");
      expect_int(comp_n, 8 * NF, "computes");
      expect_int(cyc, 144 * NF + stalls, "cycles from start to done");
      if (run == 0) begin
        checks++;
        if (stalls == 0) begin failures++; $display("FAIL no stall in run 0"); end
      end else begin
        expect_int(stalls, 0, "stalls with all data ready");
      end
      $display("run %0d: %0d cycles, %0d stalls", run, cyc, stalls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
