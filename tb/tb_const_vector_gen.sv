// tb_const_vector_gen: compares the constant row of every mode with values
// worked out by hand from (2^R - G*2^W*(2^W-1)/3) mod 2^R per result field,
// and checks the position of the last P bit and the bits moved to the final
// adder (top bit of every PMUL field).
module tb_const_vector_gen;
  import pm_pkg::*;
  localparam int N = 64;
  pm_mode_e       mode;
  logic           p_last;
  logic [2*N-1:0] cvec, cdrop;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  const_vector_gen dut (.mode, .p_last, .cvec, .cdrop);

  always #5 clk = ~clk;

  initial begin
    logic [2*N-1:0] k, d;
    int ppos;
    for (int m = 0; m < NUM_MODES; m++) begin
      mode = pm_mode_e'(m);
      case (mode)
        MODE_MUL64: begin
          k = 128'h2AAAAAAAAAAAAAAB << 64;  d = 128'h1 << 127;  ppos = 62;
        end
        MODE_PMUL32: begin
          k = (128'h2AAAAAAB << 32) | (128'h2AAAAAAB << 96);
          d = (128'h1 << 63) | (128'h1 << 127);  ppos = 94;
        end
        MODE_PMUL16: begin
          k = (128'h2AAB << 16) | (128'h2AAB << 48) | (128'h2AAB << 80) | (128'h2AAB << 112);
          d = (128'h1 << 31) | (128'h1 << 63) | (128'h1 << 95) | (128'h1 << 127);  ppos = 110;
        end
        MODE_PMADD32:  begin k = 128'hAAAAAAAB << 65; d = '0; ppos = 62; end
        MODE_PMADD16:  begin k = (128'hAAAB << 33) | (128'hAAAB << 97); d = '0; ppos = 94; end
        default:       begin k = 128'hAAAB << 66; d = '0; ppos = 62; end
      endcase
      for (int p = 0; p < 2; p++) begin
        p_last = p[0];
        #1;
        checks++;
        if (cvec != (k | (128'(p) << ppos)) || cdrop != d) begin
          failures++;
          $display("ERROR mode %0d p=%0d: cvec %h cdrop %h", m, p, cvec, cdrop);
        end
      end
    end
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
