// csa_3_2: a row of (3,2) counters (full adders without carry propagation).
//
// Three W-bit vectors in, a sum vector and a carry vector out, with
// sum + carry = x + y + z (mod 2^W). The carry of column i is returned already
// moved to column i+1; the carry out of the top column is discarded, which is
// the modulo-2^W arithmetic of the product field. Combinational.
module csa_3_2 #(
  parameter int unsigned W = 128
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-1:0] maj;

  always_comb begin
    sum   = x ^ y ^ z;
    maj   = (x & y) | (x & z) | (y & z);
    carry = {maj[W-2:0], 1'b0};
  end

endmodule
