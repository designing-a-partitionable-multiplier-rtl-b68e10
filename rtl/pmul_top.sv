// pmul_top: 64-bit partitionable signed multiplier (PMUL and PMADD).
//
// One 64x64 radix-4 Booth multiplier whose array can be split into two 32-bit
// or four 16-bit multipliers (PMUL), or whose split products can be summed in
// the same pass (PMADD). The datapath:
//   booth_encoder   32 Booth digits, with the multiplier bits cut at the
//                   sub-word boundaries of the mode
//   pp_generator    32 rows of programmable Booth multiplexors; masked cells
//                   keep sub-products apart, S-bar / P / L cells complete them
//   const_vector_gen the 33rd row: constant vector of the mode + last P bit
//   p_overlap_csa   PMADD only: P bits that collide with a sub-block
//   csa_array x4    array of arrays with 7-7-8-11 rows (the 33 rows); the
//                   PMADD overlap row joins array 3, which has slack
//   comb_4_2 x3     (arrays 1+2) + array 3, then + array 4, serially
//   seg_cpa         segmented final adder; adds the bits moved out of the
//                   array at field boundaries
// Pipeline (this design's choice; the document evaluates the combinational
// path from a clocked operand register to the array output and treats the
// final adder apart): operand register -> Booth encode, multiplexors, carry
// save arrays, (4,2) combiners -> sum/carry register -> final adder -> result
// register. One operation per clock; the result of operands presented with
// in_valid in cycle t appears with out_valid in cycle t+3.
//
// Operands: sub-word k of in_a / in_b is bits [k*W +: W] (W = 64, 32, 16).
// Result fields of out_p (all two's complement):
//   MODE_MUL64     p[127:0]
//   MODE_PMUL32    a_k*b_k in p[64k +: 64], k = 0,1
//   MODE_PMUL16    a_k*b_k in p[32k +: 32], k = 0..3
//   MODE_PMADD32   a0*b0 + a1*b1 in p[32 +: 65]
//   MODE_PMADD16   a0*b0 + a1*b1 in p[16 +: 33], a2*b2 + a3*b3 in p[80 +: 33]
//   MODE_PMADD16X4 sum of the four products in p[48 +: 34]
// In the PMADD modes the bits outside these fields carry no meaning.
// The document fixes the modes, the 33 rows, the 7-7-8-11 arrays and the
// (4,2) joins; the mode encoding, field offsets of the sums and the pipeline
// are this design's.
module pmul_top
  import pm_pkg::*;
#(
  parameter int unsigned N  = 64,
  parameter int unsigned A1 = 7,   // rows of array 1
  parameter int unsigned A2 = 7,   // rows of array 2
  parameter int unsigned A3 = 8,   // rows of array 3 (plus the PMADD overlap row)
  parameter int unsigned A4 = 11   // rows of array 4 (ends with the constant row)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  pm_mode_e       in_mode,
  input  logic [N-1:0]   in_a,     // multiplicand
  input  logic [N-1:0]   in_b,     // multiplier
  output logic           out_valid,
  output pm_mode_e       out_mode,
  output logic [2*N-1:0] out_p
);

  localparam int unsigned R  = N / 2;   // Booth rows
  localparam int unsigned NR = R + 1;   // rows into the arrays (with the constant row)
  localparam int unsigned PW = 2 * N;   // product width

  initial begin
    assert (A1 + A2 + A3 + A4 == NR)
      else $error("array sizes must add up to N/2+1 partial products");
    assert (N % 8 == 0) else $error("N must be a multiple of 8");
  end

  // ---------------- stage 0: operand register ----------------
  logic         v0;
  pm_mode_e     mode0;
  logic [N-1:0] a0, b0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v0    <= 1'b0;
      mode0 <= MODE_MUL64;
      a0    <= '0;
      b0    <= '0;
    end else begin
      v0 <= in_valid;
      if (in_valid) begin
        mode0 <= in_mode;
        a0    <= in_a;
        b0    <= in_b;
      end
    end
  end

  // Only the six defined mode codes may be issued; the two spare codes are
  // decoded as MODE_MUL64 by the datapath but carry no defined result layout.
  always_ff @(posedge clk) begin
    if (rst_n && in_valid) begin
      assert (int'(in_mode) < int'(NUM_MODES))
        else $error("pmul_top: undefined mode code %0d", in_mode);
    end
  end

  // ---------------- partial products ----------------
  booth_sel_t       sel [R];
  logic [PW-1:0]    rows [R];
  logic [PW-1:0]    sbar_drop, cvec, cdrop, pfix;
  logic [R-1:0]     negs;

  booth_encoder #(.N(N)) u_enc (
    .b   (b0),
    .mode(mode0),
    .sel (sel)
  );

  pp_generator #(.N(N)) u_ppg (
    .a        (a0),
    .sel      (sel),
    .mode     (mode0),
    .rows     (rows),
    .sbar_drop(sbar_drop)
  );

  always_comb begin
    for (int j = 0; j < int'(R); j++) negs[j] = sel[j].neg;
  end

  const_vector_gen #(.N(N)) u_const (
    .mode  (mode0),
    .p_last(sel[R-1].neg),
    .cvec  (cvec),
    .cdrop (cdrop)
  );

  p_overlap_csa #(.N(N)) u_pfix (
    .sel_neg(negs),
    .mode   (mode0),
    .row    (pfix)
  );

  // ---------------- array of arrays ----------------
  logic [PW-1:0] all_rows [NR];
  always_comb begin
    for (int j = 0; j < int'(R); j++) all_rows[j] = rows[j];
    all_rows[R] = cvec;
  end

  logic [PW-1:0] arr1 [A1];
  logic [PW-1:0] arr2 [A2];
  logic [PW-1:0] arr3 [A3+1];
  logic [PW-1:0] arr4 [A4];

  always_comb begin
    for (int k = 0; k < int'(A1); k++) arr1[k] = all_rows[k];
    for (int k = 0; k < int'(A2); k++) arr2[k] = all_rows[A1 + k];
    for (int k = 0; k < int'(A3); k++) arr3[k] = all_rows[A1 + A2 + k];
    arr3[A3] = pfix;
    for (int k = 0; k < int'(A4); k++) arr4[k] = all_rows[A1 + A2 + A3 + k];
  end

  logic [PW-1:0] s1, c1, s2, c2, s3, c3, s4, c4;
  logic [PW-1:0] s12, c12, s123, c123, s_all, c_all;

  csa_array #(.W(PW), .ROWS(A1))     u_arr1 (.pp(arr1), .sum(s1), .carry(c1));
  csa_array #(.W(PW), .ROWS(A2))     u_arr2 (.pp(arr2), .sum(s2), .carry(c2));
  csa_array #(.W(PW), .ROWS(A3 + 1)) u_arr3 (.pp(arr3), .sum(s3), .carry(c3));
  csa_array #(.W(PW), .ROWS(A4))     u_arr4 (.pp(arr4), .sum(s4), .carry(c4));

  comb_4_2 #(.W(PW)) u_j12  (.x1(s1),   .x2(c1),   .x3(s2), .x4(c2), .sum(s12),   .carry(c12));
  comb_4_2 #(.W(PW)) u_j123 (.x1(s12),  .x2(c12),  .x3(s3), .x4(c3), .sum(s123),  .carry(c123));
  comb_4_2 #(.W(PW)) u_jall (.x1(s123), .x2(c123), .x3(s4), .x4(c4), .sum(s_all), .carry(c_all));

  // ---------------- stage 1: sum/carry register ----------------
  logic          v1;
  pm_mode_e      mode1;
  logic [PW-1:0] s_r, c_r, corr_r;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1     <= 1'b0;
      mode1  <= MODE_MUL64;
      s_r    <= '0;
      c_r    <= '0;
      corr_r <= '0;
    end else begin
      v1 <= v0;
      if (v0) begin
        mode1  <= mode0;
        s_r    <= s_all;
        c_r    <= c_all;
        corr_r <= sbar_drop | cdrop;
      end
    end
  end

  // ---------------- final adder and result register ----------------
  logic [PW-1:0] p_sum;

  seg_cpa #(.N(N)) u_cpa (
    .s   (s_r),
    .c   (c_r),
    .corr(corr_r),
    .mode(mode1),
    .p   (p_sum)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_mode  <= MODE_MUL64;
      out_p     <= '0;
    end else begin
      out_valid <= v1;
      if (v1) begin
        out_mode <= mode1;
        out_p    <= p_sum;
      end
    end
  end

endmodule
