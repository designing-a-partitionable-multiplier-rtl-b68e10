// tb_pmul_top: end-to-end test of the partitionable multiplier at its default
// size (N = 64, arrays 7-7-8-11).
//
// Streams operations of all six modes through the pipeline, mostly back to
// back (one per clock) with occasional idle cycles, mixing random operands
// with the corner values 0, -1, the most negative and the most positive
// sub-words. Each result is compared, field by field, with products and sums
// computed by the simulator's own signed arithmetic, and must appear exactly
// three cycles after its operands. The test also counts how often the
// mechanisms of the design were exercised: every mode, a mode switch between
// back-to-back operations, the collided-P row of PMADD, dropped S-bar bits at
// PMUL field boundaries, and a carry that the segmented adder had to cut.
module tb_pmul_top;
  import pm_pkg::*;

  localparam int unsigned N      = 64;
  localparam int          NOPS   = 6000;
  localparam int          LAT    = 3;

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
  int mode_seen [NUM_MODES];
  int n_switch = 0, n_pfix = 0, n_sbar = 0, n_cut = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // ---- reference model ----
  typedef struct {
    pm_mode_e       mode;
    logic [2*N-1:0] exp;
    logic [2*N-1:0] mask;
    int             issue;
  } op_t;
  op_t q[$];

  function automatic logic signed [2*N-1:0] sx(logic [N-1:0] v, int w, int k);
    logic signed [2*N-1:0] r;
    r = '0;
    for (int i = 0; i < 2 * N; i++) r[i] = (i < w) ? v[k*w + i] : v[k*w + w - 1];
    return r;
  endfunction

  function automatic void reference(pm_mode_e m, logic [N-1:0] a, logic [N-1:0] b,
                                    output logic [2*N-1:0] e, output logic [2*N-1:0] mk);
    logic signed [2*N-1:0] t, u;
    int w;
    e = '0; mk = '0;
    case (m)
      MODE_MUL64: begin
        e = sx(a, N, 0) * sx(b, N, 0);  mk = '1;
      end
      MODE_PMUL32, MODE_PMUL16: begin
        w = (m == MODE_PMUL32) ? N / 2 : N / 4;
        for (int k = 0; k < N / w; k++) begin
          t = sx(a, w, k) * sx(b, w, k);
          for (int i = 0; i < 2 * w; i++) begin
            e[2*w*k + i] = t[i];  mk[2*w*k + i] = 1'b1;
          end
        end
      end
      MODE_PMADD32: begin
        t = sx(a, N/2, 0) * sx(b, N/2, 0) + sx(a, N/2, 1) * sx(b, N/2, 1);
        for (int i = 0; i < N + 1; i++) begin e[N/2 + i] = t[i]; mk[N/2 + i] = 1'b1; end
      end
      MODE_PMADD16: begin
        t = sx(a, N/4, 0) * sx(b, N/4, 0) + sx(a, N/4, 1) * sx(b, N/4, 1);
        u = sx(a, N/4, 2) * sx(b, N/4, 2) + sx(a, N/4, 3) * sx(b, N/4, 3);
        for (int i = 0; i < N/2 + 1; i++) begin
          e[N/4 + i] = t[i];   mk[N/4 + i] = 1'b1;
          e[5*N/4 + i] = u[i]; mk[5*N/4 + i] = 1'b1;
        end
      end
      default: begin  // MODE_PMADD16X4
        t = '0;
        for (int k = 0; k < 4; k++) t += sx(a, N/4, k) * sx(b, N/4, k);
        for (int i = 0; i < N/2 + 2; i++) begin e[3*N/4 + i] = t[i]; mk[3*N/4 + i] = 1'b1; end
      end
    endcase
  endfunction

  function automatic logic [N-1:0] operand(pm_mode_e m);
    logic [N-1:0] v;
    int w;
    v = {$urandom, $urandom};
    w = N / num_parts(m);
    // sometimes force sub-words to corner values
    for (int k = 0; k < N / w; k++) begin
      case ($urandom_range(0, 9))
        0: for (int i = 0; i < w; i++) v[k*w + i] = (i == w - 1);  // most negative
        1: for (int i = 0; i < w; i++) v[k*w + i] = (i != w - 1);  // most positive
        2: for (int i = 0; i < w; i++) v[k*w + i] = 1'b1;          // -1
        3: for (int i = 0; i < w; i++) v[k*w + i] = 1'b0;          // 0
        default: ;
      endcase
    end
    return v;
  endfunction

  // ---- stimulus ----
  initial begin
    pm_mode_e prev;
    logic [2*N-1:0] e, mk;
    op_t op;
    prev = MODE_MUL64;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < NOPS; n++) begin
      pm_mode_e m;
      logic [N-1:0] a, b;
      if ($urandom_range(0, 7) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      m = pm_mode_e'($urandom_range(0, NUM_MODES - 1));
      a = operand(m);
      b = operand(m);
      reference(m, a, b, e, mk);
      op.mode = m; op.exp = e; op.mask = mk; op.issue = cycle;
      q.push_back(op);
      mode_seen[m]++;
      if (in_valid && m != prev) n_switch++;
      prev = m;
      in_valid <= 1'b1;
      in_mode  <= m;
      in_a     <= a;
      in_b     <= b;
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("ERROR: %0d results never came out", q.size());
    end
    for (int m = 0; m < NUM_MODES; m++) begin
      checks++;
      if (mode_seen[m] == 0) begin failures++; $display("ERROR: mode %0d never run", m); end
    end
    checks += 4;
    if (n_switch == 0) begin failures++; $display("ERROR: no back-to-back mode switch"); end
    if (n_pfix == 0)   begin failures++; $display("ERROR: PMADD overlap row never used"); end
    if (n_sbar == 0)   begin failures++; $display("ERROR: no dropped S-bar bit"); end
    if (n_cut == 0)    begin failures++; $display("ERROR: segmented adder never cut a carry"); end
    $display("modes %0d %0d %0d %0d %0d %0d, switches %0d, overlap-row %0d, sbar-drop %0d, cut carries %0d",
             mode_seen[0], mode_seen[1], mode_seen[2], mode_seen[3], mode_seen[4], mode_seen[5],
             n_switch, n_pfix, n_sbar, n_cut);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters (observed at the pipeline stages) ----
  always @(posedge clk) begin
    if (rst_n && dut.v0 && dut.pfix != '0) n_pfix++;
    if (rst_n && dut.v0 && dut.sbar_drop != '0) n_sbar++;
    if (rst_n && dut.v1 && !is_madd(dut.mode1) && dut.mode1 != MODE_MUL64) begin
      // a carry out of a field that the segmented adder discards: without
      // the dropped bits and the cut it would have corrupted the next field
      int fw;
      logic [2:0] top;
      fw = (dut.mode1 == MODE_PMUL16) ? N / 2 : N;
      for (int f = 1; f * fw <= 2 * N; f++) begin
        top = {1'b0, dut.u_cpa.t[f*fw-2 +: 2]} + {1'b0, dut.corr_r[f*fw-2 +: 2]};
        if (top[2]) n_cut++;
      end
    end
  end

  // ---- checker ----
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      op_t op;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("ERROR: unexpected result");
      end else begin
        op = q.pop_front();
        if (out_mode != op.mode || (out_p & op.mask) != (op.exp & op.mask)) begin
          failures++;
          if (failures < 10)
            $display("ERROR mode %0d: got %h exp %h", op.mode, out_p & op.mask, op.exp & op.mask);
        end
        checks++;
        // issue is read on the edge before the operands are sampled, so a
        // result in cycle t+LAT is seen here LAT+1 edges later
        if (cycle - op.issue != LAT + 1) begin
          failures++;
          if (failures < 10) $display("ERROR: latency %0d", cycle - op.issue);
        end
      end
    end
  end

  // ---- watchdog ----
  initial begin
    repeat (NOPS * 2 + 100) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
