// const_vector_gen: the extra partial product row of constants and the last
// P bit.
//
// Every Booth row is written as its low W bits plus S-bar (the inverted sign)
// one place above. Compared with a sign-extended row that adds 2^W at the
// row's weight, so a sub-multiplier of W/2 rows carries the surplus
// X = 2^W * (4^(W/2) - 1) / 3 = 2^W * (2^W - 1) / 3. This row adds, for each
// result field of R bits at weight B, the constant (2^R - G*X) mod 2^R
// shifted to B, which cancels the surplus of the G products summed there. The
// constant depends on the mode only. In a field of W = 16 bits it reads
// 0xAAAB << 16; in general it is 1010...1011 followed by zeros.
// In the PMUL modes the top bit of each field's constant is always 1; it is
// sent to the final adder (cdrop) together with the dropped S-bar, so that no
// carry leaves a field inside the carry save array.
// The row also holds the P (negative digit) bit of the last Booth row, which
// has no row below it, at weight 2*(N/2-1) + s*W.
// The document places the constant vector and the last P bit in this 33rd
// row; the constant formula and the PMADD field widths are this design's.
//
// Interface: mode, p_last = neg of the last Booth row. cvec enters the carry
// save array; cdrop goes to the final adder. Combinational.
module const_vector_gen
  import pm_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  pm_mode_e       mode,
  input  logic           p_last,
  output logic [2*N-1:0] cvec,
  output logic [2*N-1:0] cdrop
);

  localparam int MODES = 8;  // unused mode codes act as MODE_MUL64

  typedef logic [2*N+1:0] wide_t;

  function automatic pm_mode_e mode_of(int m);
    return (m < NUM_MODES) ? pm_mode_e'(m) : MODE_MUL64;
  endfunction

  // kind 0: constant kept in the row, 1: dropped constant bits, 2: P position
  function automatic logic [2*N-1:0] const_of(pm_mode_e md, int kind);
    int unsigned w, g, rb, b, np, lastseg;
    wide_t x, k, keep, drop, one;
    w    = N / num_parts(md);
    np   = num_parts(md);
    g    = group_size(md);
    one  = wide_t'(1);
    keep = '0;
    drop = '0;
    for (int unsigned q = 0; q < np; q += g) begin
      rb = result_bits(md, N);
      b  = result_base(md, N, q);
      x  = wide_t'(g) * ((one << w) * (((one << w) - one) / wide_t'(3)));
      k  = ((one << rb) - x) & ((one << rb) - one);
      if (g == 1) begin
        drop |= (k & (one << (rb - 1))) << b;
        k    &= ~(one << (rb - 1));
      end
      keep |= k << b;
    end
    lastseg = seg_of_part(md, np - 1);
    case (kind)
      0:       return keep[2*N-1:0];
      1:       return drop[2*N-1:0];
      default: begin
        k = one << (N - 2 + lastseg * w);
        return k[2*N-1:0];
      end
    endcase
  endfunction

  logic [2*N-1:0] keep_m [MODES];
  logic [2*N-1:0] drop_m [MODES];
  logic [2*N-1:0] ppos_m [MODES];

  for (genvar mi = 0; mi < MODES; mi++) begin : g_mode
    localparam logic [2*N-1:0] KEEP = const_of(mode_of(mi), 0);
    localparam logic [2*N-1:0] DROP = const_of(mode_of(mi), 1);
    localparam logic [2*N-1:0] PPOS = const_of(mode_of(mi), 2);
    assign keep_m[mi] = KEEP;
    assign drop_m[mi] = DROP;
    assign ppos_m[mi] = PPOS;
  end

  always_comb begin
    cvec  = keep_m[mode] | (ppos_m[mode] & {(2*N){p_last}});
    cdrop = drop_m[mode];
  end

endmodule
