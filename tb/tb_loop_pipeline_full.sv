// tb_loop_pipeline_full: one complete run of the pipelined Fast DCT at its
// default size, 5400 blocks of 8x8 (a 720x480 image), with random 9-bit
// signed pixels. Checks every dct_o element against the reference
// column-then-row DCT, the column-pass length (144 cycles per block), the
// row-pass length (144 per block plus one per wait cycle) and that the run
// overlaps the two passes; prints the cycle counts and the gain over running
// the two passes one after the other.
module tb_loop_pipeline_full;
  import lp_pkg::*;
  import tb_dct_ref::*;
  localparam int unsigned NF = 5400;
  localparam int unsigned SZ = M * NF;
  localparam int unsigned AW = $clog2(SZ);

  logic          clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic          ready, busy, done, loop12_busy, loop12_done, loop3_busy, loop3_stall;
  logic          img_we = 1'b0, out_re = 1'b0;
  logic [AW-1:0] img_waddr = '0, out_raddr = '0;
  sample_t       img_wdata = '0, out_rdata;
  shortint       img [SZ];
  shortint       expect_o [SZ];
  int checks = 0, failures = 0;

  loop_pipeline_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_int(input longint got, input longint exp_v, input string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp_v);
    end
  endtask

  initial begin
    shortint b_in[64], b_tmp[64], b_out[64];
    longint cyc, c12, waits, overlap;
    int bad;
    for (int a = 0; a < SZ; a++) img[a] = shortint'($signed(9'($urandom)));
    for (int b = 0; b < NF; b++) begin
      for (int e = 0; e < 64; e++) b_in[e] = img[64 * b + e];
      dct_2d(b_in, b_tmp, b_out);
      for (int e = 0; e < 64; e++) expect_o[64 * b + e] = b_out[e];
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // load the image while the ready table sweeps itself clear
    for (int a = 0; a < SZ; a++) begin
      @(negedge clk); img_we = 1'b1; img_waddr = AW'(a); img_wdata = img[a];
    end
    @(negedge clk); img_we = 1'b0;
    while (!ready) @(negedge clk);
    start = 1'b1;
    @(negedge clk); start = 1'b0;
    cyc = 0; c12 = -1; waits = 0; overlap = 0;
    while (!done) begin
      if (loop12_busy && loop3_busy) overlap++;
      if (loop3_stall) waits++;
      if (loop12_done) c12 = cyc;
      @(negedge clk);
      cyc++;
    end
    expect_int(c12, 144 * NF, "column pass length");
    expect_int(cyc, 144 * NF + waits, "row pass length");
    checks++;
    if (overlap == 0) begin failures++; $display("FAIL no overlap"); end
    $display("column pass %0d cycles, run %0d cycles, %0d wait cycles, %0d overlapped cycles",
             c12, cyc, waits, overlap);
    $display("passes one after the other: %0d cycles, gain %f", 2 * 144 * NF,
             real'(2 * 144 * NF) / real'(cyc));
    @(negedge clk);
    bad = 0;
    for (int a = 0; a < SZ; a++) begin
      out_re = 1'b1; out_raddr = AW'(a);
      @(negedge clk);
      checks++;
      if ($signed(out_rdata) != expect_o[a]) begin
        failures++; bad++;
        if (bad < 10) $display("FAIL dct_o[%0d] got %0d exp %0d", a, $signed(out_rdata), expect_o[a]);
      end
    end
    out_re = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
