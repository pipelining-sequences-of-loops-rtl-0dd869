// tb_loop_pipeline_top: end-to-end test of the pipelined Fast DCT.
//
// Parameters: NF blocks (4 unless overridden). The testbench waits for the
// ready table's reset sweep, loads a random image (9-bit signed pixels),
// starts a run and checks every dct_o element against the reference
// column-then-row DCT. It then runs a second, different image without a
// reset, so the second run only works if the ready flags of the first run
// read as "not ready". It counts the mechanisms of the scheme and fails if
// one never happened:
//   - overlap: cycles in which both loop sets are busy;
//   - wait:    cycles in which FSM 2 found a flag not set and re-read;
//   - reuse:   runs after the first one on the same table.
// Timing checks: the column pass takes 144 cycles per block; the row pass
// finishes 144 cycles per block plus one per wait cycle after start, and
// the whole run is shorter than the two passes one after the other.
module tb_loop_pipeline_top #(
  parameter int unsigned NF = 4
);
  import lp_pkg::*;
  import tb_dct_ref::*;
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
  int overlap = 0, waits = 0, reuse = 0;

  loop_pipeline_top #(.NUM_FDCTS(NF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (SZ * 20 + 100000) @(posedge clk);
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

  task automatic make_image(input int run);
    shortint b_in[64], b_tmp[64], b_out[64];
    for (int a = 0; a < SZ; a++)
      img[a] = (run == 0 && a < 64) ? shortint'(a * 4 - 128)   // a ramp block
                                    : shortint'($signed(9'($urandom)));
    for (int b = 0; b < SZ / 64; b++) begin
      for (int e = 0; e < 64; e++) b_in[e] = img[64 * b + e];
      dct_2d(b_in, b_tmp, b_out);
      for (int e = 0; e < 64; e++) expect_o[64 * b + e] = b_out[e];
    end
  endtask

  task automatic do_run(input int run);
    longint cyc, c12, stalls_run;
    int bad;
    make_image(run);
    for (int a = 0; a < SZ; a++) begin
      @(negedge clk); img_we = 1'b1; img_waddr = AW'(a); img_wdata = img[a];
    end
    @(negedge clk); img_we = 1'b0;
    expect_int(longint'(ready), 1, "ready before start");
    start = 1'b1;
    @(negedge clk); start = 1'b0;
    cyc = 0; c12 = -1; stalls_run = 0;
    while (!done) begin
      if (loop12_busy && loop3_busy) overlap++;
      if (loop3_stall) begin waits++; stalls_run++; end
      if (loop12_done) c12 = cyc;
      // a start while busy must be ignored
      if (cyc == 10) start = 1'b1; else start = 1'b0;
      @(negedge clk);
      cyc++;
    end
    start = 1'b0;
    expect_int(c12, 144 * NF, "column pass length");
    expect_int(cyc, 144 * NF + stalls_run, "row pass length");
    checks++;
    if (cyc >= 2 * 144 * NF) begin failures++; $display("FAIL no overlap gain"); end
    $display("run %0d: column pass %0d cycles, total %0d cycles, %0d wait cycles, sequential would be %0d (speedup %f)",
             run, c12, cyc, stalls_run, 2 * 144 * NF, real'(2 * 144 * NF) / real'(cyc));
    @(negedge clk);
    expect_int(longint'(busy), 0, "idle after done");
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
    if (run > 0) reuse++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    expect_int(longint'(ready), 0, "not ready during sweep");
    while (!ready) @(negedge clk);
    for (int run = 0; run < 2; run++) do_run(run);
    $display("mechanisms: overlap=%0d wait=%0d reuse=%0d", overlap, waits, reuse);
    checks += 3;
    if (overlap == 0) begin failures++; $display("FAIL overlap never happened"); end
    if (waits == 0)   begin failures++; $display("FAIL wait never happened"); end
    if (reuse == 0)   begin failures++; $display("FAIL reuse never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
