// pm_pkg: shared types and mode arithmetic of the partitionable multiplier.
//
// The multiplier has one N-bit datapath (N = 64 by default) that is split into
// P equal parts of W = N/P bits. Part q owns Booth rows q*W/2 .. (q+1)*W/2-1.
// In a parallel multiply (PMUL) the rows of part q meet multiplicand sub-word
// q, so the sub-products sit on the diagonal and land in distinct result
// fields. In a multiply-add (PMADD) a group of G parts meets the multiplicand
// sub-words in reverse order (the anti-diagonal), so that every product of a
// group has the same weight and the carry save array adds them for free.
// The functions below give, for every mode, the part count, the group size and
// which multiplicand sub-word ("segment") a part meets. They describe wiring
// only: all of them are constant for a given mode.
package pm_pkg;

  // Operating modes. The 3-bit code is this design's own choice.
  typedef enum logic [2:0] {
    MODE_MUL64    = 3'd0,  // one 64x64 signed multiply, 128-bit product
    MODE_PMUL32   = 3'd1,  // two 32x32 multiplies, two 64-bit products
    MODE_PMUL16   = 3'd2,  // four 16x16 multiplies, four 32-bit products
    MODE_PMADD32  = 3'd3,  // a0*b0 + a1*b1 on 32-bit sub-words
    MODE_PMADD16  = 3'd4,  // (a0*b0 + a1*b1), (a2*b2 + a3*b3) on 16-bit sub-words
    MODE_PMADD16X4 = 3'd5  // a0*b0 + a1*b1 + a2*b2 + a3*b3 on 16-bit sub-words
  } pm_mode_e;

  localparam int unsigned NUM_MODES = 6;

  // Selects of one radix-4 Booth digit d in {-2,-1,0,1,2}: one = |d| is 1,
  // two = |d| is 2, neg = d is negative.
  typedef struct packed {
    logic neg;
    logic two;
    logic one;
  } booth_sel_t;

  // Number of parts the N-bit datapath is split into.
  function automatic int unsigned num_parts(pm_mode_e mode);
    case (mode)
      MODE_MUL64:                  return 1;
      MODE_PMUL32, MODE_PMADD32:   return 2;
      default:                     return 4;
    endcase
  endfunction

  // Number of products summed into one result (1 for a plain multiply).
  function automatic int unsigned group_size(pm_mode_e mode);
    case (mode)
      MODE_PMADD32, MODE_PMADD16:  return 2;
      MODE_PMADD16X4:              return 4;
      default:                     return 1;
    endcase
  endfunction

  function automatic logic is_madd(pm_mode_e mode);
    return group_size(mode) > 1;
  endfunction

  // Multiplicand segment met by part q: q itself for PMUL, mirrored inside its
  // group for PMADD.
  function automatic int unsigned seg_of_part(pm_mode_e mode, int unsigned q);
    int unsigned g, base;
    g    = q % group_size(mode);
    base = q - g;
    return base + group_size(mode) - 1 - g;
  endfunction

  // Bits needed for the exact signed result of one group: 2W for a product,
  // one more bit for each doubling of the number of summed products.
  function automatic int unsigned result_bits(pm_mode_e mode, int unsigned n);
    int unsigned w;
    w = n / num_parts(mode);
    case (group_size(mode))
      2:       return 2 * w + 1;
      4:       return 2 * w + 2;
      default: return 2 * w;
    endcase
  endfunction

  // Weight (bit position in the 2N-bit sum) of the result of the group that
  // contains part q: q*W + seg*W, the same for every part of a group.
  function automatic int unsigned result_base(pm_mode_e mode, int unsigned n, int unsigned q);
    int unsigned w;
    w = n / num_parts(mode);
    return (q + seg_of_part(mode, q)) * w;
  endfunction

endpackage
