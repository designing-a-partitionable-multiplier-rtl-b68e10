// csa_array: one sub-array of the array-of-arrays adder.
//
// ROWS partial products are added by a linear chain of ROWS-2 carry save
// adder rows: the first adds rows 0..2, and each further one adds the next
// partial product to the running sum and carry. The chain is short and
// regular, which is what makes the array cheap to wire; several such arrays
// run in parallel and are joined by (4,2) combiners (see pmul_top). The
// result is a sum/carry pair whose total equals the sum of the rows modulo
// 2^W. The document gives the array-of-arrays organisation and the sizes;
// the linear chain inside one array is the usual array structure.
//
// Interface: pp[ROWS] in, sum/carry out. Combinational, ROWS-2 adder levels.
module csa_array #(
  parameter int unsigned W    = 128,
  parameter int unsigned ROWS = 7
) (
  input  logic [W-1:0] pp [ROWS],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  initial begin
    assert (ROWS >= 3) else $error("csa_array needs at least three rows");
  end

  logic [W-1:0] s [ROWS-1];
  logic [W-1:0] c [ROWS-1];

  assign s[0] = pp[0];
  assign c[0] = pp[1];

  for (genvar k = 0; k < int'(ROWS) - 2; k++) begin : g_level
    csa_3_2 #(.W(W)) u_csa (
      .x    (s[k]),
      .y    (c[k]),
      .z    (pp[k+2]),
      .sum  (s[k+1]),
      .carry(c[k+1])
    );
  end

  assign sum   = s[ROWS-2];
  assign carry = c[ROWS-2];

endmodule
