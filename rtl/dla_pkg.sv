// dla_pkg: types shared by the deep-learning-accelerator (DLA) memory blocks.
//
// Every SRAM word is 96 bits so that a whole number of elements of any
// supported precision fits in it: 16 x 6b, 12 x 8b, 8 x 12b, 6 x 16b,
// 4 x 24b or 3 x 32b. Weights, inputs and outputs use 6/8/12/16 bits,
// temporary (accumulator) outputs 16/24/32 bits. The precision encoding below
// is this design's own.
package dla_pkg;

  typedef enum logic [2:0] {
    PREC_6  = 3'd0,
    PREC_8  = 3'd1,
    PREC_12 = 3'd2,
    PREC_16 = 3'd3,
    PREC_24 = 3'd4,
    PREC_32 = 3'd5
  } prec_e;

  function automatic int unsigned prec_bits(prec_e p);
    case (p)
      PREC_6:  return 6;
      PREC_8:  return 8;
      PREC_12: return 12;
      PREC_16: return 16;
      PREC_24: return 24;
      default: return 32;
    endcase
  endfunction

  // elements per 96-bit word
  function automatic logic [4:0] prec_count(prec_e p);
    case (p)
      PREC_6:  return 5'd16;
      PREC_8:  return 5'd12;
      PREC_12: return 5'd8;
      PREC_16: return 5'd6;
      PREC_24: return 5'd4;
      default: return 5'd3;
    endcase
  endfunction

endpackage
