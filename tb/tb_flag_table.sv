// tb_flag_table: starting from random table contents, checks that the
// reset sweep takes DEPTH cycles and leaves every entry "not ready", that set
// entries read ready in the run that set them and not before, that a read
// in the cycle of the set returns the old value, and that the next run
// (new_run) sees every entry as not ready again.
module tb_flag_table;
  localparam int unsigned DEPTH = 64;
  localparam int unsigned AW    = 6;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          init_done, new_run = 1'b0, set_en = 1'b0, rd_en = 1'b0;
  logic [AW-1:0] set_addr = '0, rd_addr = '0;
  logic          rd_ready;
  logic          model [DEPTH];
  int checks = 0, failures = 0;

  flag_table #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(input logic got, input logic exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s addr %0d got %0b exp %0b", what, rd_addr, got, exp_v);
    end
  endtask

  task automatic read_all(input string what);
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); rd_en = 1'b1; rd_addr = AW'(a);
      @(negedge clk); rd_en = 1'b0;
      expect_eq(rd_ready, model[a], what);
    end
  endtask

  task automatic start_run();
    @(negedge clk); new_run = 1'b1;
    @(negedge clk); new_run = 1'b0;
    foreach (model[a]) model[a] = 1'b0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    cyc = 0;
    while (!init_done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != DEPTH) begin failures++; $display("FAIL sweep took %0d cycles", cyc); end
    for (int run = 0; run < 4; run++) begin
      start_run();
      read_all("fresh run");
      // set a random half, including a read in the cycle of the set
      for (int a = 0; a < DEPTH; a++) begin
        if ($urandom_range(1) != 0) begin
          @(negedge clk);
          set_en = 1'b1; set_addr = AW'(a); rd_en = 1'b1; rd_addr = AW'(a);
          @(negedge clk);
          set_en = 1'b0; rd_en = 1'b0;
          expect_eq(rd_ready, 1'b0, "read during set");
          model[a] = 1'b1;
        end
      end
      read_all("after set");
      // complete the run: every entry set once
      for (int a = 0; a < DEPTH; a++) if (!model[a]) begin
        @(negedge clk); set_en = 1'b1; set_addr = AW'(a);
        model[a] = 1'b1;
      end
      @(negedge clk); set_en = 1'b0;
      read_all("all set");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
