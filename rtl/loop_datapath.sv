// loop_datapath: datapath of one loop set (Loops 1,2 or Loop 3).
//
// The controlling FSM loads the eight values f0..f7 of a column (Loops 1,2)
// or row (Loop 3) one per cycle into f-registers (ld_en, ld_idx, ld_data),
// then pulses comp_en once: the eight DCT results F0..F7 are computed by
// dct8_kernel and registered. During the store phase the FSM selects one
// result per cycle with st_idx; st_data is that register, without delay.
// One datapath instance sits next to each FSM, as in the decoupled scheme;
// the register-based gather/compute/scatter structure is this design's own.
//
// Timing: a value on ld_data is written at the clock edge where ld_en is
// high; F is updated at the edge where comp_en is high and readable on
// st_data from the next cycle.
module loop_datapath
  import lp_pkg::*;
(
  input  logic    clk,
  input  logic    ld_en,
  input  idx_t    ld_idx,
  input  sample_t ld_data,
  input  logic    comp_en,
  input  idx_t    st_idx,
  output sample_t st_data
);

  vec8_t f_q, F_d, F_q;

  dct8_kernel u_dct (.f(f_q), .F(F_d));

  always_ff @(posedge clk) begin
    if (ld_en)   f_q[ld_idx] <= ld_data;
    if (comp_en) F_q         <= F_d;
  end

  assign st_data = F_q[st_idx];

endmodule
