// loop3_fsm: FSM 2, the controller of the row pass (Loop 3).
//
// For every row (N*NUM_FDCTS rows, i_1 = 0, 8, 16, ...) it loads the eight
// tmp elements i_1+0 .. i_1+7. The tmp memory and the ready table are read
// at the same address in the same cycle; one cycle later the data arrive
// with rd_ready. The FSM moves on to the next element if and only if the
// flag says the element has been produced; otherwise it reads the same
// element again, and keeps doing so until the producer has stored it. The
// order in which the producer stores elements does not matter. After the
// eighth load the datapath computes F0r..F7r, which are stored to dct_o at
// i_1+0 .. i_1+7.
//
// Timing (this design's own schedule): when every flag is already set a
// row takes LOAD 9 cycles (8 pipelined reads plus one cycle of read
// latency), COMP 1 and STORE 8: 18 cycles, 144 per block. Every cycle in
// which a returned flag is not set adds one cycle and is flagged on stall.
// The read address of a cycle depends on the flag returned in that cycle
// (re-read or next element), so no read is wasted.
module loop3_fsm
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
  // tmp read port and tab read port (same address, same cycle)
  output logic              rd_re,
  output logic [ADDR_W-1:0] rd_addr,
  input  logic              rd_ready,
  // datapath control
  output logic              ld_en,
  output idx_t              ld_idx,
  output logic              comp_en,
  output idx_t              st_idx,
  // dct_o write port
  output logic              st_we,
  output logic [ADDR_W-1:0] st_addr,
  // status
  output logic              stall
);

  typedef enum logic [1:0] {IDLE, LOAD, COMP, STORE} state_t;

  localparam int unsigned ROW_W = $clog2(N * NUM_FDCTS + 1);

  state_t            state;
  logic [3:0]        k;      // next element to accept
  logic [3:0]        k_n;
  logic              pend;   // a read of element k was issued last cycle
  logic              accept;
  logic [ROW_W-1:0]  row;
  logic [ADDR_W-1:0] i1;

  always_comb begin
    accept  = (state == LOAD) && pend && rd_ready;
    stall   = (state == LOAD) && pend && !rd_ready;
    k_n     = k + {3'b000, accept};
    rd_re   = (state == LOAD) && !k_n[3];
    rd_addr = i1 + ADDR_W'(k_n[2:0]);
    ld_en   = accept;
    ld_idx  = k[2:0];
    comp_en = (state == COMP);
    st_we   = (state == STORE);
    st_idx  = k[2:0];
    st_addr = i1 + ADDR_W'(k[2:0]);
    busy    = (state != IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      k     <= '0;
      pend  <= 1'b0;
      row   <= '0;
      i1    <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: begin
          pend <= 1'b0;
          if (start) begin
            state <= LOAD;
            k     <= '0;
            row   <= '0;
            i1    <= '0;
          end
        end
        LOAD: begin
          k    <= k_n;
          pend <= rd_re;
          if (accept && k[2:0] == idx_t'(N - 1)) state <= COMP;
        end
        COMP: begin
          k     <= '0;
          state <= STORE;
        end
        STORE: begin
          if (k[2:0] == idx_t'(N - 1)) begin
            k    <= '0;
            pend <= 1'b0;
            i1   <= i1 + ADDR_W'(N);
            if (row == ROW_W'(N * NUM_FDCTS - 1)) begin
              state <= IDLE;
              done  <= 1'b1;
            end else begin
              row   <= row + 1'b1;
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
