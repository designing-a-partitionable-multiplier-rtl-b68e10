// tb_seg_cpa: random sum/carry vectors, and correction bits in the two top
// columns of each PMUL field. In the PMUL modes every field (32, 64 or 128
// bits) must equal its own s + c + corr modulo the field width, whatever the
// field below produced; in the PMADD modes the result is s + c over the full
// 128 bits. Inputs that make a carry cross a field boundary are frequent.
module tb_seg_cpa;
  import pm_pkg::*;
  localparam int N = 64;
  logic [2*N-1:0] s, c, corr, p;
  pm_mode_e       mode;
  logic clk = 1'b0;
  int checks = 0, failures = 0, crossings = 0;

  seg_cpa dut (.s, .c, .corr, .mode, .p);

  always #5 clk = ~clk;

  initial begin
    logic [2*N-1:0] e;
    int fw;
    for (int it = 0; it < 6000; it++) begin
      mode = pm_mode_e'(it % NUM_MODES);
      s    = (it % 13 == 0) ? '1 : {$urandom, $urandom, $urandom, $urandom};
      c    = {$urandom, $urandom, $urandom, $urandom};
      case (mode)
        MODE_PMUL16: fw = 32;
        MODE_PMUL32: fw = 64;
        MODE_MUL64:  fw = 128;
        default:     fw = 0;
      endcase
      corr = '0;
      if (fw != 0)
        for (int f = 1; f * fw <= 2 * N; f++) begin
          corr[f*fw-2 +: 2] = 2'($urandom);
        end
      #1;
      if (fw == 0) e = s + c;
      else begin
        e = '0;
        for (int f = 0; f < 2 * N / fw; f++) begin
          logic [2*N-1:0] fs, fc, fr, msk;
          msk = (fw == 128) ? '1 : ((128'h1 << fw) - 1);
          fs = (s >> (f * fw)) & msk;
          fc = (c >> (f * fw)) & msk;
          fr = (fs + fc + ((corr >> (f * fw)) & msk)) & msk;
          e |= fr << (f * fw);
          if (f > 0 && ((((s >> ((f-1) * fw)) & msk) + ((c >> ((f-1) * fw)) & msk)) >> fw) != 0)
            crossings++;
        end
      end
      checks++;
      if (p != e) begin
        failures++;
        if (failures < 10) $display("ERROR mode %0d: %h vs %h", mode, p, e);
      end
    end
    checks++;
    if (crossings == 0) begin failures++; $display("ERROR: no boundary carry exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
