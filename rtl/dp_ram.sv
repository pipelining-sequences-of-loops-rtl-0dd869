// dp_ram: memory of one array variable (img, tmp or dct_o).
//
// One write port and one read port that work in the same cycle, so that a
// producer loop set can store while a consumer loop set loads (the
// dual-port tmp memory between Loops 1,2 and Loop 3). The read is
// synchronous: rdata holds mem[raddr] from the clock edge where re was
// high. A read of the address being written in the same cycle returns the
// old contents (read-first); the consumer FSM relies on the ready table
// behaving the same way. The contents are not reset.
//
// Parameters: DEPTH words of WIDTH bits.
module dp_ram #(
  parameter int unsigned DEPTH  = 64 * 5400,
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [WIDTH-1:0]  wdata,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic [WIDTH-1:0]  rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
