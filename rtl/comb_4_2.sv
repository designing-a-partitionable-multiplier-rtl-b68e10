// comb_4_2: a (4,2) combiner row, adding two sum/carry pairs into one.
//
// Each column is the usual 4:2 compressor: a first full adder takes x1..x3 and
// passes its carry sideways to the next column (cout does not depend on that
// column's cin, so there is no ripple), a second full adder takes the first
// one's sum, x4 and the sideways carry from the column below. Out come a sum
// vector and a carry vector (already moved up one column) with
// sum + carry = x1 + x2 + x3 + x4 (mod 2^W). Two full-adder delays.
// The document names (4,2) combiners for joining sub-arrays; the compressor
// inside is the standard one.
module comb_4_2 #(
  parameter int unsigned W = 128
) (
  input  logic [W-1:0] x1,
  input  logic [W-1:0] x2,
  input  logic [W-1:0] x3,
  input  logic [W-1:0] x4,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-1:0] s1, cout, cin, c2;

  always_comb begin
    s1    = x1 ^ x2 ^ x3;
    cout  = (x1 & x2) | (x1 & x3) | (x2 & x3);
    cin   = {cout[W-2:0], 1'b0};
    sum   = s1 ^ x4 ^ cin;
    c2    = (s1 & x4) | (s1 & cin) | (x4 & cin);
    carry = {c2[W-2:0], 1'b0};
  end

endmodule
