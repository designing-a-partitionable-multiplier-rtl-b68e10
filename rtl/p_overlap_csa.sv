// p_overlap_csa: the extra carry save adder for P bits that collide with a
// sub-multiplier in the PMADD modes.
//
// In PMADD the parts of a group meet the multiplicand sub-words in reverse
// order, so the P (negative digit) bit of the last row of one part would fall
// into the active cells of the next part's first row. Those bits are taken out
// of the array and summed here into one extra row that joins the carry save
// array off the critical path. The colliding P bits come from the last rows of
// parts 0, 1 and 2 in the four-product mode (all three at weight N-2, so a
// (3,2) counter adds them into bits N-2 and N-1), of parts 0 and 2 in the
// paired 16-bit mode (weights 2W-2 and 6W-2), and of part 0 in the 32-bit
// mode (weight N-2). In the PMUL modes the row is zero. The document names the
// bits and says they are added by extra carry save adders; the wiring is this
// design's.
//
// Interface: sel_neg[j] = neg of Booth row j, mode. row is a 2N-bit
// partial product. Combinational.
module p_overlap_csa
  import pm_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [N/2-1:0] sel_neg,
  input  pm_mode_e       mode,
  output logic [2*N-1:0] row
);

  localparam int unsigned Q = N / 4;  // quarter-word width
  localparam int unsigned H = N / 2;  // half-word width

  // neg of the last row of each quarter part and of the first half part
  logic p0q, p1q, p2q, p0h;
  assign p0q = sel_neg[Q/2-1];
  assign p1q = sel_neg[Q-1];
  assign p2q = sel_neg[3*Q/2-1];
  assign p0h = sel_neg[H/2-1];

  always_comb begin
    row = '0;
    case (mode)
      MODE_PMADD16X4: begin
        // (3,2) counter: three bits of weight N-2
        row[N-2] = p0q ^ p1q ^ p2q;
        row[N-1] = (p0q & p1q) | (p0q & p2q) | (p1q & p2q);
      end
      MODE_PMADD16: begin
        row[2*Q-2] = p0q;
        row[6*Q-2] = p2q;
      end
      MODE_PMADD32: row[N-2] = p0h;
      default: row = '0;
    endcase
  end

endmodule
