// tb_workloads: the multimedia workloads the multiplier is meant for, run on
// the full-size design with one operation issued every clock.
//
//   1. 16-bit PMUL: 256 operations of four 16x16 products (1024 products).
//   2. 32-bit PMUL: 256 operations of two 32x32 products (512 products).
//   3. 4-tap FIR filter y[n] = h0*x[n] + h1*x[n-1] + h2*x[n-2] + h3*x[n-3]
//      on 16-bit samples, one output per clock with MODE_PMADD16X4: the
//      coefficients sit in in_a, the last four samples in in_b.
//
// Each result is checked against integer arithmetic done here. For each
// workload the testbench also checks the rate: a stream of K operations must
// deliver its last result exactly K - 1 + 3 cycles after the first operand,
// i.e. 4, 2 and 1 results per clock after the 3-cycle latency.
module tb_workloads;
  import pm_pkg::*;

  localparam int N   = 64;
  localparam int K   = 256;
  localparam int LAT = 3;

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  logic           in_valid = 1'b0;
  pm_mode_e       in_mode = MODE_MUL64;
  logic [N-1:0]   in_a = '0, in_b = '0;
  logic           out_valid;
  pm_mode_e       out_mode;
  logic [2*N-1:0] out_p;

  pmul_top dut (
    .clk, .rst_n, .in_valid, .in_mode, .in_a, .in_b,
    .out_valid, .out_mode, .out_p
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // expected results, one queue entry per operation
  logic [2*N-1:0] exp_q[$];
  logic [2*N-1:0] msk_q[$];
  int results = 0, first_out = -1, last_out = -1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [2*N-1:0] e, mk;
      if (first_out < 0) first_out = cycle;
      last_out = cycle;
      results++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("ERROR: unexpected result");
      end else begin
        e  = exp_q.pop_front();
        mk = msk_q.pop_front();
        if ((out_p & mk) != (e & mk)) begin
          failures++;
          if (failures < 10) $display("ERROR: got %h exp %h", out_p & mk, e & mk);
        end
      end
    end
  end

  function automatic logic signed [63:0] s16(logic [15:0] v);
    return 64'(signed'(v));
  endfunction

  // Run one stream of K back-to-back operations and check its rate.
  task automatic run_stream(input int which);
    logic signed [15:0] x [K+3];
    logic signed [15:0] h [4];
    int start;
    for (int i = 0; i < K + 3; i++) x[i] = 16'($urandom);
    for (int i = 0; i < 4; i++) h[i] = 16'($urandom);
    results = 0; first_out = -1; last_out = -1;
    start = cycle;
    for (int n = 0; n < K; n++) begin
      logic [N-1:0] a, b;
      logic [2*N-1:0] e, mk;
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      e = '0; mk = '0;
      case (which)
        0: begin
          in_mode <= MODE_PMUL16;
          for (int k = 0; k < 4; k++) begin
            e[32*k +: 32]  = 32'(s16(a[16*k +: 16]) * s16(b[16*k +: 16]));
            mk[32*k +: 32] = '1;
          end
        end
        1: begin
          in_mode <= MODE_PMUL32;
          for (int k = 0; k < 2; k++) begin
            logic signed [127:0] p;
            p = 128'(signed'(a[32*k +: 32])) * 128'(signed'(b[32*k +: 32]));
            e[64*k +: 64]  = p[63:0];
            mk[64*k +: 64] = '1;
          end
        end
        default: begin
          logic signed [63:0] y;
          in_mode <= MODE_PMADD16X4;
          // a_k = h_k, b_k = x[n+3-k] (newest sample against h0)
          y = 0;
          for (int k = 0; k < 4; k++) begin
            a[16*k +: 16] = h[k];
            b[16*k +: 16] = x[n + 3 - k];
            y += s16(h[k]) * s16(x[n + 3 - k]);
          end
          e[48 +: 34]  = y[33:0];
          mk[48 +: 34] = '1;
        end
      endcase
      exp_q.push_back(e);
      msk_q.push_back(mk);
      in_valid <= 1'b1;
      in_a     <= a;
      in_b     <= b;
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (results != K) begin
      failures++;
      $display("ERROR workload %0d: %0d results of %0d", which, results, K);
    end
    // first operand sampled on edge start+1; results seen one edge after
    // they appear, so the last of K is seen on edge start + K + LAT
    checks++;
    if (last_out - first_out != K - 1 || first_out - start != LAT + 1) begin
      failures++;
      $display("ERROR workload %0d: first %0d last %0d start %0d", which, first_out, last_out, start);
    end
    $display("workload %0d: %0d operations in %0d cycles", which, K, last_out - start);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run_stream(0);
    run_stream(1);
    run_stream(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * K + 200) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
