// tb_booth_mux_cell: exhaustive test of the programmable Booth multiplexor.
// All 2^9 input combinations are applied. The expected output follows the
// cell-type table: with row_sel = 1 the cell returns the selected multiple
// (m for |d| = 1, m_x2 for |d| = 2, 0 otherwise), complemented for a negative
// digit and complemented again for an S-bar cell (msb = 1); with row_sel = 0
// it returns the P bit inv_1 when lsb = 1 and a masked 0 when lsb = 0.
module tb_booth_mux_cell;
  import pm_pkg::*;

  booth_sel_t sel;
  logic row_sel, msb, lsb, inv_1, m, m_x2, pp;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  booth_mux_cell dut (.sel, .row_sel, .msb, .lsb, .inv_1, .m, .m_x2, .pp);

  always #5 clk = ~clk;

  initial begin
    logic exp, pick;
    for (int v = 0; v < 512; v++) begin
      {sel.neg, sel.two, sel.one, row_sel, msb, lsb, inv_1, m, m_x2} = 9'(v);
      #1;
      if (sel.one && sel.two) continue;  // not a legal Booth select
      if (!row_sel) exp = lsb ? inv_1 : 1'b0;
      else begin
        if (sel.one) pick = m;
        else if (sel.two) pick = m_x2;
        else pick = 1'b0;
        if (sel.neg) pick = !pick;
        exp = msb ? !pick : pick;
      end
      checks++;
      if (pp !== exp) begin
        failures++;
        $display("ERROR v=%0h pp=%b exp=%b", v, pp, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
