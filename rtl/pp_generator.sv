// pp_generator: the N/2 rows of programmable Booth multiplexors.
//
// Row j has N+3 cells at physical columns c = -2 .. N (cell c of row j has
// weight 2j + c, so equal weights line up two columns apart from row to row).
// For each operating mode every cell is programmed, from the mode alone, as
// one of the cell types of booth_mux_cell:
//   * regular multiplexor for the W columns of the multiplicand sub-word s
//     that the row's part meets; the lowest of them is an L cell (no 2M input
//     from the neighbouring sub-word),
//   * S-bar at column s*W + W, fed with the sub-word's sign bit,
//   * P at column s'*W - 2, adding the negative-digit bit of the row above
//     (s' is that row's sub-word), and
//   * masked 0 everywhere else.
// The all-ones sign extensions are replaced by S-bar plus a constant that
// const_vector_gen adds, so every row, the first included, has the same
// shape. Two bits leave the array:
//   * sbar_drop: in the PMUL modes the S-bar of the last row of each part sits
//     in the second-highest column of that part's result field. It is steered
//     to the final adder instead of the carry save array, which, with the
//     constant's top bit also moved there, keeps every carry inside its field.
//   * the P bit of the last row of a part whose P column would fall inside the
//     next part's active cells (PMADD only) is not placed here; p_overlap_csa
//     adds it, and const_vector_gen adds the P bit of the very last row.
// The cell programming follows the document's cell table and its projection
// of constant and sign bits; the exact cell positions are this design's
// construction of it.
//
// Interface: a = multiplicand, sel = Booth digits from booth_encoder, mode.
// rows[j] is row j placed at its weight in a 2N-bit vector. Combinational.
module pp_generator
  import pm_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   a,
  input  booth_sel_t     sel [N/2],
  input  pm_mode_e       mode,
  output logic [2*N-1:0] rows [N/2],
  output logic [2*N-1:0] sbar_drop
);

  localparam int unsigned R = N / 2;
  localparam int MODES = 8;  // all codes of the mode field; unused ones act as MODE_MUL64

  typedef enum int {K_MASK, K_REG, K_L, K_SBAR, K_P} kind_e;

  function automatic pm_mode_e mode_of(int m);
    return (m < NUM_MODES) ? pm_mode_e'(m) : MODE_MUL64;
  endfunction

  function automatic int seg_of_row(pm_mode_e md, int j);
    int unsigned w;
    w = N / num_parts(md);
    return seg_of_part(md, j / (w / 2));
  endfunction

  // Is the P bit of row i placed in row i+1 (false for the last row)?
  function automatic bit p_routed(pm_mode_e md, int i);
    if (i >= R - 1) return 1'b0;
    return seg_of_row(md, i) <= seg_of_row(md, i + 1);
  endfunction

  function automatic kind_e cell_kind(pm_mode_e md, int j, int c);
    int w, s;
    w = N / num_parts(md);
    s = seg_of_row(md, j);
    if (c == s * w) return K_L;
    if (c > s * w && c < s * w + w) return K_REG;
    if (c == s * w + w) return K_SBAR;
    if (j > 0 && p_routed(md, j - 1) && c == seg_of_row(md, j - 1) * w - 2) return K_P;
    return K_MASK;
  endfunction

  // S-bar of the last row of a part in a PMUL mode goes to the final adder.
  function automatic bit cell_drop(pm_mode_e md, int j, int c);
    int w;
    w = N / num_parts(md);
    return !is_madd(md) && (j % (w / 2) == w / 2 - 1) && cell_kind(md, j, c) == K_SBAR;
  endfunction

  // Programming of the N+3 cells of row j in one mode; bit c+2 is column c.
  typedef struct packed {
    logic [N+2:0] rs;    // row_sel
    logic [N+2:0] msb;   // invert (S-bar)
    logic [N+2:0] lsb;   // P cell
    logic [N+2:0] lz;    // L cell: no 2M input
    logic [N+2:0] drop;  // steer the output to sbar_drop
  } row_prog_t;

  function automatic row_prog_t row_prog(pm_mode_e md, int j);
    row_prog_t p;
    kind_e     k;
    p = '0;
    for (int c = -2; c <= int'(N); c++) begin
      k = cell_kind(md, j, c);
      p.rs[c+2]   = (k == K_REG || k == K_L || k == K_SBAR);
      p.msb[c+2]  = (k == K_SBAR);
      p.lsb[c+2]  = (k == K_P);
      p.lz[c+2]   = (k == K_L);
      p.drop[c+2] = cell_drop(md, j, c);
    end
    return p;
  endfunction

  // Per-mode programming, selected at run time by the mode field.
  row_prog_t prog_m [MODES][R];
  row_prog_t prog   [R];

  for (genvar mi = 0; mi < MODES; mi++) begin : g_mode
    for (genvar j = 0; j < R; j++) begin : g_rowprog
      localparam row_prog_t PROG = row_prog(mode_of(mi), j);
      assign prog_m[mi][j] = PROG;
    end
  end

  always_comb begin
    for (int j = 0; j < R; j++) prog[j] = prog_m[mode][j];
  end

  // The multiplicand as seen by column c (index c+2); columns -2, -1 and N
  // have no multiplicand bit of their own.
  logic [N+2:0] acol;
  assign acol = {1'b0, a, 2'b00};

  logic [2*N-1:0] drop_rows [R];

  for (genvar j = 0; j < R; j++) begin : g_row
    logic [N+2:0] pp;

    for (genvar c = -2; c <= int'(N); c++) begin : g_cell
      logic inv_1;
      if (j > 0) begin : g_inv
        assign inv_1 = sel[j-1].neg;
      end else begin : g_inv0
        assign inv_1 = 1'b0;
      end
      if (c >= 0) begin : g_core
        // An S-bar cell takes the sub-word sign, the bit just below it.
        booth_mux_cell u_cell (
          .sel    (sel[j]),
          .row_sel(prog[j].rs[c+2]),
          .msb    (prog[j].msb[c+2]),
          .lsb    (prog[j].lsb[c+2]),
          .inv_1  (inv_1),
          .m      (prog[j].msb[c+2] ? acol[c+1] : acol[c+2]),
          .m_x2   (prog[j].lz[c+2] ? 1'b0 : acol[c+1]),
          .pp     (pp[c+2])
        );
      end else begin : g_pcol
        // Columns left of the core only ever hold a P cell or a mask.
        booth_mux_cell u_cell (
          .sel    (sel[j]),
          .row_sel(1'b0),
          .msb    (1'b0),
          .lsb    (prog[j].lsb[c+2]),
          .inv_1  (inv_1),
          .m      (1'b0),
          .m_x2   (1'b0),
          .pp     (pp[c+2])
        );
      end
    end

    // Place the row at weight 2j - 2 (its column -2).
    logic [2*N+1:0] kept, dropped;
    assign kept    = {{(N-1){1'b0}}, pp & ~prog[j].drop} << (2 * j);
    assign dropped = {{(N-1){1'b0}}, pp &  prog[j].drop} << (2 * j);
    assign rows[j]      = kept[2*N+1:2];
    assign drop_rows[j] = dropped[2*N+1:2];
  end

  always_comb begin
    sbar_drop = '0;
    for (int j = 0; j < R; j++) sbar_drop |= drop_rows[j];
  end

endmodule
