// masc_pkg: types and constants shared by the MASC (multiple-access
// single-charge) TCAM blocks.
//
// A MASC TCAM splits its search word into encoding blocks of BLOCK_W bits.
// The match lines of a block are precharged once and then reused for several
// searches; how many searches are safe depends on BLOCK_W. The refresh periods
// for exact search (7, 5 and 4 searches for 2-, 4- and 8-bit blocks) and the
// 6- and 8-search periods that give 1- and 2-bit Hamming-distance matching on
// 8-bit blocks follow the published circuit results. Applying the same +2/+4
// offsets to 2- and 4-bit blocks is this design's own choice.
package masc_pkg;

  // Approximation mode of the low-order blocks, chosen per application.
  typedef enum logic [1:0] {
    APPROX_EXACT = 2'd0,   // every block refreshed at its exact period
    APPROX_1HD   = 2'd1,   // low blocks may match within 1 bit
    APPROX_2HD   = 2'd2    // low blocks may match within 2 bits
  } approx_mode_e;

  // Width of a charge-age / refresh counter; holds periods up to 15.
  localparam int unsigned AGE_W = 4;

  // FPU operand width: approximation is applied to the low blocks of each
  // operand of this width.
  localparam int unsigned OPERAND_W = 32;

  // Extra searches a match line may serve beyond the exact period before its
  // sensed value admits one more bit of Hamming distance.
  localparam int unsigned HD_STEP = 2;

  // Longest error-free refresh period of a block of the given width.
  function automatic int unsigned exact_period(int unsigned block_w);
    case (block_w)
      2:       return 7;
      4:       return 5;
      8:       return 4;
      default: return 4;
    endcase
  endfunction

  // Refresh period for a block running in the given mode.
  function automatic logic [AGE_W-1:0] refresh_period(int unsigned block_w,
                                                      approx_mode_e mode);
    int unsigned p;
    p = exact_period(block_w);
    case (mode)
      APPROX_1HD: p = p + HD_STEP;
      APPROX_2HD: p = p + 2 * HD_STEP;
      default:    p = p;
    endcase
    return AGE_W'(p);
  endfunction

  // Hamming-distance tolerance of the sense amplifier on a match line that
  // is serving its age-th search since it was last precharged.
  function automatic logic [1:0] sense_tolerance(int unsigned block_w,
                                                 logic [AGE_W-1:0] age);
    int unsigned pe;
    pe = exact_period(block_w);
    if (int'(age) <= int'(pe))                 return 2'd0;
    else if (int'(age) <= int'(pe + HD_STEP))  return 2'd1;
    else                                       return 2'd2;
  endfunction

  // FPU kinds that each get an associative memory, and their key widths.
  typedef enum logic [1:0] {
    FPU_ADD  = 2'd0,
    FPU_MUL  = 2'd1,
    FPU_SQRT = 2'd2,
    FPU_MAD  = 2'd3
  } fpu_kind_e;

  localparam int unsigned NUM_FPU   = 4;
  localparam int unsigned MAX_KEY_W = 96;

  function automatic int unsigned fpu_key_w(int unsigned kind);
    case (kind)
      0:       return 64;   // ADD: two 32-bit operands
      1:       return 64;   // MUL: two 32-bit operands
      2:       return 32;   // SQRT: one 32-bit operand
      default: return 96;   // MAD: three 32-bit operands
    endcase
  endfunction

endpackage
