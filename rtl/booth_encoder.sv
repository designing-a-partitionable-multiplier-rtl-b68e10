// booth_encoder: the column of N/2 radix-4 (modified Booth) encoders.
//
// Row j looks at three overlapping multiplier bits (2l+1, 2l, 2l-1) of the
// sub-word it works on and selects a digit d in {-2,-1,0,+1,+2}. In a
// partitioned mode the bit below a sub-word is forced to 0, so every part
// encodes its own signed W-bit multiplier and no digit straddles a boundary.
// In a PMADD mode a part encodes the multiplier sub-word whose multiplicand
// sub-word it meets on the anti-diagonal (pm_pkg::seg_of_part), so that each
// product of the sum is a_k*b_k. The document gives the Booth recoding and the
// per-mode split; the sub-word steering on the multiplier side is this
// design's choice.
//
// Interface: b is the N-bit multiplier (sub-word k in bits [k*W +: W]); mode
// selects the partition. sel[j] holds the digit of row j (weight 4^j within
// its part). Purely combinational.
module booth_encoder
  import pm_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   b,
  input  pm_mode_e       mode,
  output booth_sel_t     sel [N/2]
);

  booth_sel_t sel_m [NUM_MODES][N/2];

  for (genvar m = 0; m < NUM_MODES; m++) begin : g_mode
    localparam pm_mode_e    M  = pm_mode_e'(m);
    localparam int unsigned W  = N / num_parts(M);
    localparam int unsigned RP = W / 2;  // rows per part
    for (genvar j = 0; j < N / 2; j++) begin : g_row
      localparam int unsigned Q  = j / RP;
      localparam int unsigned L  = j % RP;
      localparam int unsigned S  = seg_of_part(M, Q);
      localparam int unsigned HI = S * W + 2 * L + 1;
      logic x2, x1, x0;
      assign x2 = b[HI];
      assign x1 = b[HI-1];
      if (L == 0) begin : g_first
        assign x0 = 1'b0;  // nothing below a sub-word
      end else begin : g_next
        assign x0 = b[HI-2];
      end
      assign sel_m[m][j].one = x1 ^ x0;
      assign sel_m[m][j].two = (x2 & ~x1 & ~x0) | (~x2 & x1 & x0);
      assign sel_m[m][j].neg = x2 & ~(x1 & x0);
    end
  end

  always_comb begin
    for (int j = 0; j < N / 2; j++) begin
      sel[j] = sel_m[0][j];
      for (int m = 1; m < NUM_MODES; m++) begin
        if (mode == pm_mode_e'(m)) sel[j] = sel_m[m][j];
      end
    end
  end

endmodule
