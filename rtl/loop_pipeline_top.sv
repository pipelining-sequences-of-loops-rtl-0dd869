// loop_pipeline_top: Fast DCT of NUM_FDCTS 8x8 blocks, with the column pass
// (Loops 1,2) and the row pass (Loop 3) running concurrently.
//
// Structure: each loop set has its own FSM and datapath (loop12_fsm +
// loop_datapath, loop3_fsm + loop_datapath). Both FSMs start in the same
// cycle. The column pass reads img and writes tmp column by column; the row
// pass reads tmp row by row, i.e. in a different order from the one in
// which it was written. Synchronisation is by data availability only: tmp
// is a dual-port memory, and a dual-port 1-bit table (flag_table) holds one
// ready flag per tmp element, set by the column pass as it stores and
// checked by FSM 2 in parallel with every tmp load. dct_o receives the
// result. No FIFO and no handshake between the two FSMs is needed.
//
// Host interface (this design's own): after reset the ready table clears
// itself (M*NUM_FDCTS cycles); ready is high when that is done and no run is
// in progress. The host writes the input image through img_we/img_waddr/
// img_wdata, pulses start, waits for the done pulse and then reads the
// result through out_re/out_raddr (out_rdata one cycle later). Arrays are
// stored block after block, 64 elements per block, row-major inside a block.
// loop12_busy, loop12_done (pulse at the end of the column pass),
// loop3_busy and loop3_stall show the overlap of the two loop
// sets and the cycles in which FSM 2 waited for data.
//
// Timing: the column pass takes exactly 144 cycles per block. The row pass
// also needs 144 cycles per block, plus one cycle each time FSM 2 finds a
// flag not yet set; this happens only while it is catching up with the
// column pass in the first block (about 130 cycles), after which the two
// passes run side by side one block apart. A run of NUM_FDCTS blocks thus
// takes about 144*NUM_FDCTS + 130 cycles from start to done, against
// 288*NUM_FDCTS for the two passes one after the other.
module loop_pipeline_top
  import lp_pkg::*;
#(
  parameter int unsigned NUM_FDCTS = 5400,
  parameter int unsigned SIZE      = M * NUM_FDCTS,
  parameter int unsigned ADDR_W    = $clog2(SIZE)
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              ready,
  input  logic              start,
  output logic              busy,
  output logic              done,
  // img load port
  input  logic              img_we,
  input  logic [ADDR_W-1:0] img_waddr,
  input  sample_t           img_wdata,
  // dct_o read port
  input  logic              out_re,
  input  logic [ADDR_W-1:0] out_raddr,
  output sample_t           out_rdata,
  // status
  output logic              loop12_busy,
  output logic              loop12_done,
  output logic              loop3_busy,
  output logic              loop3_stall
);

  logic              init_done;
  logic              run_start;

  // Loops 1,2
  logic              img_re;
  logic [ADDR_W-1:0] img_raddr;
  sample_t           img_rdata;
  logic              ld1_en, comp1_en, st1_we;
  idx_t              ld1_idx, st1_idx;
  logic [ADDR_W-1:0] st1_addr;
  sample_t           st1_data;

  // Loop 3
  logic              rd3_re;
  logic [ADDR_W-1:0] rd3_addr;
  sample_t           tmp_rdata;
  logic              rd3_ready;
  logic              ld3_en, comp3_en, st3_we;
  idx_t              ld3_idx, st3_idx;
  logic [ADDR_W-1:0] st3_addr;
  sample_t           st3_data;

  assign busy      = loop12_busy || loop3_busy;
  assign ready     = init_done && !busy;
  assign run_start = start && ready;

  // ---------------- memories ----------------
  dp_ram #(.DEPTH(SIZE), .WIDTH(DATA_W)) u_img (
    .clk, .we(img_we), .waddr(img_waddr), .wdata(img_wdata),
    .re(img_re), .raddr(img_raddr), .rdata(img_rdata)
  );

  dp_ram #(.DEPTH(SIZE), .WIDTH(DATA_W)) u_tmp (
    .clk, .we(st1_we), .waddr(st1_addr), .wdata(st1_data),
    .re(rd3_re), .raddr(rd3_addr), .rdata(tmp_rdata)
  );

  flag_table #(.DEPTH(SIZE)) u_tab (
    .clk, .rst_n, .init_done, .new_run(run_start),
    .set_en(st1_we), .set_addr(st1_addr),
    .rd_en(rd3_re), .rd_addr(rd3_addr), .rd_ready(rd3_ready)
  );

  dp_ram #(.DEPTH(SIZE), .WIDTH(DATA_W)) u_dct_o (
    .clk, .we(st3_we), .waddr(st3_addr), .wdata(st3_data),
    .re(out_re), .raddr(out_raddr), .rdata(out_rdata)
  );

  // ---------------- Loops 1,2: FSM 1 and datapath ----------------
  loop12_fsm #(.NUM_FDCTS(NUM_FDCTS), .ADDR_W(ADDR_W)) u_fsm1 (
    .clk, .rst_n, .start(run_start), .busy(loop12_busy), .done(loop12_done),
    .img_re, .img_raddr,
    .ld_en(ld1_en), .ld_idx(ld1_idx), .comp_en(comp1_en), .st_idx(st1_idx),
    .st_we(st1_we), .st_addr(st1_addr)
  );

  loop_datapath u_dp1 (
    .clk, .ld_en(ld1_en), .ld_idx(ld1_idx), .ld_data(img_rdata),
    .comp_en(comp1_en), .st_idx(st1_idx), .st_data(st1_data)
  );

  // ---------------- Loop 3: FSM 2 and datapath ----------------
  loop3_fsm #(.NUM_FDCTS(NUM_FDCTS), .ADDR_W(ADDR_W)) u_fsm2 (
    .clk, .rst_n, .start(run_start), .busy(loop3_busy), .done,
    .rd_re(rd3_re), .rd_addr(rd3_addr), .rd_ready(rd3_ready),
    .ld_en(ld3_en), .ld_idx(ld3_idx), .comp_en(comp3_en), .st_idx(st3_idx),
    .st_we(st3_we), .st_addr(st3_addr), .stall(loop3_stall)
  );

  loop_datapath u_dp3 (
    .clk, .ld_en(ld3_en), .ld_idx(ld3_idx), .ld_data(tmp_rdata),
    .comp_en(comp3_en), .st_idx(st3_idx), .st_data(st3_data)
  );

  // The row pass cannot finish before the column pass: its last row needs
  // the last column's stores.
  a_order: assert property (@(posedge clk) disable iff (!rst_n)
                            done |-> !loop12_busy);

endmodule
