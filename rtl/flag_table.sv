// flag_table: dual-port 1-bit ready table ("tab"), one flag per element of
// the produced/consumed array.
//
// Port A (set_en, set_addr) is used by the producer (Loops 1,2) to mark an
// element ready in the cycle it is stored. Port B (rd_en, rd_addr) is read
// by the consumer FSM in parallel with the data memory; rd_ready, one cycle
// later, says whether that element has been produced in the current run.
//
// Own choices, where the scheme only asks for a table that starts all zero:
// - After reset the table sweeps itself to zero through port A, one entry
//   per clock, DEPTH cycles; init_done rises when that is finished.
// - Instead of clearing all DEPTH flags before every run, each run has a
//   phase bit that new_run toggles. The producer writes the phase value and
//   an entry counts as ready when it equals the phase. Because every
//   element is written exactly once per run, a finished run leaves all
//   entries at the old phase, which reads as "not ready" in the next run.
// - A read of an entry being set in the same cycle returns the old value
//   (read-first), matching dp_ram, so data and flag are always seen in the
//   same state.
module flag_table #(
  parameter int unsigned DEPTH  = 64 * 5400,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              init_done,
  input  logic              new_run,
  input  logic              set_en,
  input  logic [ADDR_W-1:0] set_addr,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic              rd_ready
);

  logic              tab [DEPTH];
  logic              phase;
  logic [ADDR_W-1:0] init_addr;

  // Control: reset sweep and run phase.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_done <= 1'b0;
      init_addr <= '0;
      phase     <= 1'b0;
    end else begin
      if (!init_done) begin
        if (init_addr == ADDR_W'(DEPTH - 1)) init_done <= 1'b1;
        else                                 init_addr <= init_addr + 1'b1;
      end
      if (new_run && init_done) phase <= ~phase;
    end
  end

  // Port A: sweep or set.
  always_ff @(posedge clk) begin
    if (!init_done)  tab[init_addr] <= 1'b0;
    else if (set_en) tab[set_addr]  <= phase;
  end

  // Port B: read and compare with the phase of the current run.
  always_ff @(posedge clk) begin
    if (rd_en) rd_ready <= (tab[rd_addr] == phase);
  end

endmodule
