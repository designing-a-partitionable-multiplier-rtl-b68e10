// tb_p_overlap_csa: all 8 combinations of the colliding P bits in each mode.
// The row's value must equal the sum of the colliding bits at their weights:
// rows 7, 15 and 23 at weight 62 (four-product 16-bit PMADD), rows 7 and 23
// at 30 and 94 (paired 16-bit PMADD), row 15 at 62 (32-bit PMADD), nothing in
// the PMUL modes.
module tb_p_overlap_csa;
  import pm_pkg::*;
  localparam int N = 64;
  logic [N/2-1:0] sel_neg;
  pm_mode_e       mode;
  logic [2*N-1:0] row;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  p_overlap_csa dut (.sel_neg, .mode, .row);

  always #5 clk = ~clk;

  initial begin
    logic [2*N-1:0] e;
    for (int m = 0; m < NUM_MODES; m++) begin
      for (int it = 0; it < 64; it++) begin
        mode = pm_mode_e'(m);
        sel_neg = $urandom;
        if (it < 8) begin
          sel_neg[7] = it[0]; sel_neg[15] = it[1]; sel_neg[23] = it[2];
        end
        #1;
        e = '0;
        case (mode)
          MODE_PMADD16X4: e = (128'(sel_neg[7]) + 128'(sel_neg[15]) + 128'(sel_neg[23])) << 62;
          MODE_PMADD16:   e = (128'(sel_neg[7]) << 30) + (128'(sel_neg[23]) << 94);
          MODE_PMADD32:   e = 128'(sel_neg[15]) << 62;
          default:        e = '0;
        endcase
        checks++;
        if (row != e) begin
          failures++;
          $display("ERROR mode %0d negs %h: %h vs %h", m, sel_neg, row, e);
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
