// mp_pkg: types and constants shared by the dense (GEMM) and sparse (SPMM)
// multi-precision matrix multipliers.
//
// Both accelerators move data as 32 bit words. A word holds four 8 bit,
// eight 4 bit or sixteen 2 bit signed values, chosen at run time by a 2 bit
// precision input; results leave unpacked with 16 bits. The word width, the
// result width and the three precisions follow the published design. The
// encoding of the precision input is this design's choice (the value 3 acts
// as 8 bit), as is the two's complement coding of every field, which makes
// the 2 bit mode cover the ternary values -1, 0 and +1.
package mp_pkg;

  localparam int unsigned WORD_W = 32;  // width of every packed data port
  localparam int unsigned OUT_W  = 16;  // width of every result
  localparam int unsigned DIM_W  = 32;  // width of the matrix shape inputs

  typedef enum logic [1:0] {
    PREC_8 = 2'd0,   // 4 values of 8 bit per word
    PREC_4 = 2'd1,   // 8 values of 4 bit per word
    PREC_2 = 2'd2    // 16 values of 2 bit per word (ternary)
  } prec_e;

  // Number of values packed into one word at a precision.
  function automatic int unsigned lanes(prec_e p);
    case (p)
      PREC_4:  return 8;
      PREC_2:  return 16;
      default: return 4;
    endcase
  endfunction

endpackage
