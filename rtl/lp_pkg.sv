// lp_pkg: types and constants shared by the pipelined Fast DCT.
//
// The design runs an 8x8 Fast DCT as two loop sets: a column pass
// (Loops 1,2) and a row pass (Loop 3). Both passes work on rows/columns of
// N = 8 samples of 16 bits (C "short"), blocks are M = 64 elements, and the
// fixed-point products carry FRAC = 13 fraction bits, which is the ">> 13"
// applied to the stored results of the column pass. The DCT coefficient
// formula below (round(2^13 * cos(m*pi/16))) is this design's own choice of
// arithmetic for the computations the DCT loops perform.
package lp_pkg;

  localparam int unsigned N      = 8;   // samples per row / column
  localparam int unsigned M      = 64;  // elements per 8x8 block
  localparam int unsigned DATA_W = 16;  // width of a stored array element
  localparam int unsigned FRAC   = 13;  // fraction bits of the coefficients

  typedef logic signed [DATA_W-1:0]   sample_t;
  typedef logic [N-1:0][DATA_W-1:0]   vec8_t;    // f0..f7 or F0..F7
  typedef logic [$clog2(N)-1:0]       idx_t;     // 0..7 within a row/column

  // round(2^13 * cos(m*pi/16)) for m = 0..8
  function automatic int cos_q13(input int unsigned m);
    case (m)
      0:       return 8192;
      1:       return 8035;
      2:       return 7568;
      3:       return 6811;
      4:       return 5793;
      5:       return 4551;
      6:       return 3135;
      7:       return 1598;
      default: return 0;
    endcase
  endfunction

  // DCT-II coefficient 2^13 * cos((2n+1)*k*pi/16), folded onto the first
  // quarter period.
  function automatic int coef(input int unsigned k, input int unsigned n);
    int unsigned m;
    m = ((2 * n + 1) * k) % 32;
    if (m <= 8)       return  cos_q13(m);
    else if (m <= 16) return -cos_q13(16 - m);
    else if (m <= 24) return -cos_q13(m - 16);
    else              return  cos_q13(32 - m);
  endfunction

endpackage
