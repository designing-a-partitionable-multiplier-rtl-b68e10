// seg_cpa: the segmented final carry propagate adder.
//
// Adds the sum and carry vectors of the carry save array into the 2N-bit
// result. The carry chain is built from 16-bit slices (N/4 for other N); in
// the PMUL modes the carry between two slices is cut where one result field
// ends and the next begins (every 32 bits for 4x16, every 64 for 2x32), so a
// field never disturbs its neighbour. In the PMADD modes and the 64-bit mode
// the chain runs the full width.
// The adder also takes corr, the bits moved out of the carry save array to
// keep carries inside the fields: in each PMUL field the constant 1 of the top
// column and the S-bar of the last Booth row in the column below. They are
// added into the two top columns of their field, modulo the field width, by a
// 2-bit adder after the main chain. The document states that these dropped
// bits are added back in the two most significant positions of a segmented
// final adder; the slice size and the 2-bit adder are this design's.
//
// Interface: s, c, corr (2N bits), mode -> p (2N bits). Combinational.
module seg_cpa
  import pm_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [2*N-1:0] s,
  input  logic [2*N-1:0] c,
  input  logic [2*N-1:0] corr,
  input  pm_mode_e       mode,
  output logic [2*N-1:0] p
);

  localparam int unsigned SL = N / 4;        // slice width
  localparam int unsigned NS = 2 * N / SL;   // 8 slices

  logic [NS-1:0] cut;     // cut[k]: no carry into slice k
  logic [2*N-1:0] t;      // sum of s and c
  int unsigned fw;        // field width of the PMUL modes (0: no fields)

  always_comb begin
    case (mode)
      MODE_PMUL16: fw = N / 2;
      MODE_PMUL32: fw = N;
      MODE_PMADD32, MODE_PMADD16, MODE_PMADD16X4: fw = 0;
      default:     fw = 2 * N;  // MODE_MUL64 and the spare codes
    endcase
    for (int k = 0; k < int'(NS); k++) begin
      cut[k] = (fw != 0) && ((k * SL) % fw == 0);
    end
  end

  always_comb begin
    logic [SL:0] acc;
    logic        cy;
    cy = 1'b0;
    for (int k = 0; k < int'(NS); k++) begin
      acc = {1'b0, s[k*SL +: SL]} + {1'b0, c[k*SL +: SL]} + {{SL{1'b0}}, cy & ~cut[k]};
      t[k*SL +: SL] = acc[SL-1:0];
      cy = acc[SL];
    end
  end

  // Add the moved-out bits into the top two columns of each field.
  always_comb begin
    p = t;
    if (fw != 0) begin
      for (int f = 0; f < int'(2 * N / (N / 2)); f++) begin
        if ((f + 1) * (N / 2) % fw == 0) begin
          p[(f+1)*(N/2)-2 +: 2] = t[(f+1)*(N/2)-2 +: 2] + corr[(f+1)*(N/2)-2 +: 2];
        end
      end
    end
  end

endmodule
