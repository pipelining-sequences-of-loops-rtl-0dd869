// tb_dp_ram: writes random words to a small dp_ram, reads them back with
// one cycle of latency, and checks the read-first behaviour when the same
// address is written and read in one cycle, and that rdata holds while re
// is low.
module tb_dp_ram;
  localparam int unsigned DEPTH = 256;
  localparam int unsigned AW    = 8;

  logic          clk = 1'b0;
  logic          we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [15:0]   wdata = '0, rdata;
  logic [15:0]   model [DEPTH];
  int checks = 0, failures = 0;

  dp_ram #(.DEPTH(DEPTH), .WIDTH(16)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(input logic [15:0] got, input logic [15:0] exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp_v);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] held;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(a); wdata = 16'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 1'b0;
    // read back in random order
    repeat (500) begin
      @(negedge clk);
      re = 1'b1; raddr = AW'($urandom);
      @(negedge clk);
      re = 1'b0;
      expect_eq(rdata, model[raddr], "read");
    end
    // read and write the same address in one cycle: old data
    repeat (50) begin
      @(negedge clk);
      re = 1'b1; we = 1'b1; raddr = AW'($urandom); waddr = raddr; wdata = 16'($urandom);
      @(negedge clk);
      re = 1'b0; we = 1'b0;
      expect_eq(rdata, model[raddr], "read-first");
      model[raddr] = wdata;
      held = rdata;
      @(negedge clk);
      expect_eq(rdata, held, "hold while re low");
      re = 1'b1;
      @(negedge clk);
      re = 1'b0;
      expect_eq(rdata, model[raddr], "new data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
