// tb_booth_encoder: checks the Booth digits of every row in every mode.
// For random and corner multipliers the digits of each part, weighted 4^l,
// must add up to the signed value of the multiplier sub-word that part is
// meant to encode: sub-word q for PMUL, the mirrored sub-word inside its group
// for PMADD (mapping written out here as a table). Each select must also be a
// legal one-hot-or-zero code with neg only on a non-zero digit.
module tb_booth_encoder;
  import pm_pkg::*;

  localparam int N = 64;

  logic [N-1:0] b;
  pm_mode_e     mode;
  booth_sel_t   sel [N/2];
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  booth_encoder dut (.b, .mode, .sel);

  always #5 clk = ~clk;

  // which multiplier sub-word part q must encode
  function automatic int want_seg(pm_mode_e md, int q);
    case (md)
      MODE_PMADD32:   return 1 - q;
      MODE_PMADD16:   return (q < 2) ? 1 - q : 5 - q;
      MODE_PMADD16X4: return 3 - q;
      default:        return q;
    endcase
  endfunction

  function automatic int parts(pm_mode_e md);
    case (md)
      MODE_MUL64: return 1;
      MODE_PMUL32, MODE_PMADD32: return 2;
      default: return 4;
    endcase
  endfunction

  initial begin
    for (int it = 0; it < 3000; it++) begin
      mode = pm_mode_e'(it % NUM_MODES);
      case (it % 7)
        0: b = '0;
        1: b = '1;
        2: b = {4{16'h8000}};
        3: b = {4{16'h7fff}};
        default: b = {$urandom, $urandom};
      endcase
      #1;
      begin
        int w, rp;
        logic signed [N+1:0] acc, ref_v;
        w  = N / parts(mode);
        rp = w / 2;
        for (int q = 0; q < parts(mode); q++) begin
          acc = '0;
          for (int l = 0; l < rp; l++) begin
            booth_sel_t s;
            logic signed [N+1:0] d;
            s = sel[q*rp + l];
            d = s.one ? 1 : (s.two ? 2 : 0);
            if (s.neg) d = -d;
            checks++;
            if ((s.one && s.two) || (s.neg && !s.one && !s.two)) begin
              failures++;
              $display("ERROR illegal select row %0d", q*rp + l);
            end
            acc += d <<< (2 * l);
          end
          ref_v = '0;
          for (int i = 0; i < N + 2; i++)
            ref_v[i] = (i < w) ? b[want_seg(mode, q)*w + i] : b[want_seg(mode, q)*w + w - 1];
          checks++;
          if (acc != ref_v) begin
            failures++;
            $display("ERROR mode %0d part %0d: digits give %0d, want %0d", mode, q, acc, ref_v);
          end
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
