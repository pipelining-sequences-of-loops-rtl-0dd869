// loop12_fsm: FSM 1, the controller of the column pass (Loops 1 and 2).
//
// For every block i (0..NUM_FDCTS-1) and column j (0..7) it loads the eight
// img elements i_1+0, i_1+8, ..., i_1+56 (stride 8), lets the datapath
// compute F0..F7, and stores them to tmp at the same eight addresses. Each
// store also sets the element's flag in the ready table, so the row pass can
// use it at once. i_1 starts at 0, steps by 1 per column and by a further
// 56 after each block, as in the loop code the scheme starts from.
//
// Timing per column (this design's own schedule, one memory port per array):
// LOAD 9 cycles (8 pipelined reads from a synchronous RAM, the last value
// arrives one cycle after its read), COMP 1 cycle, STORE 8 cycles:
// 18 cycles per column, 144 per block. The FSM leaves IDLE on start and
// pulses done in the cycle after the last store.
module loop12_fsm
  import lp_pkg::*;
#(
  parameter int unsigned NUM_FDCTS = 5400,
  parameter int unsigned ADDR_W    = $clog2(M * NUM_FDCTS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  // img read port
  output logic              img_re,
  output logic [ADDR_W-1:0] img_raddr,
  // datapath control
  output logic              ld_en,
  output idx_t              ld_idx,
  output logic              comp_en,
  output idx_t              st_idx,
  // tmp write port and tab set port (same address, same cycle)
  output logic              st_we,
  output logic [ADDR_W-1:0] st_addr
);

  typedef enum logic [1:0] {IDLE, LOAD, COMP, STORE} state_t;

  localparam int unsigned BLK_W = $clog2(NUM_FDCTS + 1);

  state_t            state;
  logic [3:0]        k;       // element index, 8 = all reads issued
  logic              cap_v;   // a read was issued in the previous cycle
  idx_t              cap_k;
  idx_t              j;       // column within the block (Loop 2)
  logic [BLK_W-1:0]  blk;     // block (Loop 1)
  logic [ADDR_W-1:0] i1;      // i_1
  logic [ADDR_W-1:0] elem_addr;

  assign elem_addr = i1 + ADDR_W'({k[2:0], 3'b000});

  always_comb begin
    img_re    = (state == LOAD) && !k[3];
    img_raddr = elem_addr;
    ld_en     = cap_v;
    ld_idx    = cap_k;
    comp_en   = (state == COMP);
    st_we     = (state == STORE);
    st_idx    = k[2:0];
    st_addr   = elem_addr;
    busy      = (state != IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      k     <= '0;
      cap_v <= 1'b0;
      cap_k <= '0;
      j     <= '0;
      blk   <= '0;
      i1    <= '0;
      done  <= 1'b0;
    end else begin
      done  <= 1'b0;
      cap_v <= 1'b0;
      unique case (state)
        IDLE: begin
          if (start) begin
            state <= LOAD;
            k     <= '0;
            j     <= '0;
            blk   <= '0;
            i1    <= '0;
          end
        end
        LOAD: begin
          if (!k[3]) begin
            cap_v <= 1'b1;
            cap_k <= k[2:0];
            k     <= k + 1'b1;
          end
          if (cap_v && cap_k == idx_t'(N - 1)) state <= COMP;
        end
        COMP: begin
          k     <= '0;
          state <= STORE;
        end
        STORE: begin
          if (k[2:0] == idx_t'(N - 1)) begin
            k <= '0;
            if (j == idx_t'(N - 1)) begin
              j  <= '0;
              i1 <= i1 + ADDR_W'(M - N + 1);   // i_1++ then i_1 += 56
              if (blk == BLK_W'(NUM_FDCTS - 1)) begin
                state <= IDLE;
                done  <= 1'b1;
              end else begin
                blk   <= blk + 1'b1;
                state <= LOAD;
              end
            end else begin
              j     <= j + 1'b1;
              i1    <= i1 + 1'b1;
              state <= LOAD;
            end
          end else begin
            k <= k + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
