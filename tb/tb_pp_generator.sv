// tb_pp_generator: checks every row of the partial product array, in every
// mode, against values derived from the Booth digits.
//
// For row j of a part that meets the W-bit multiplicand sub-word A at sub-word
// position s, with digit d (worked out here from the multiplier bits), the
// row must be worth 2^(2j+s*W) * (d*A - neg + 2^W): the multiple, its
// two's-complement bits without the +1, and the S-bar bit. In the PMUL modes
// the S-bar of the last row of each part must instead appear on sbar_drop
// (S-bar is 1 exactly when d*A - neg >= 0). A row also carries the P (neg)
// bit of the row above at that row's weight, unless that P would land inside
// the row's own cells, which happens at the part boundaries of PMADD.
module tb_pp_generator;
  import pm_pkg::*;
  localparam int N = 64;
  localparam int R = N / 2;

  logic [N-1:0]   a, b;
  pm_mode_e       mode;
  booth_sel_t     sel [R];
  logic [2*N-1:0] rows [R];
  logic [2*N-1:0] sbar_drop;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  pp_generator dut (.a, .sel, .mode, .rows, .sbar_drop);

  always #5 clk = ~clk;

  function automatic int parts(pm_mode_e md);
    case (md)
      MODE_MUL64: return 1;
      MODE_PMUL32, MODE_PMADD32: return 2;
      default: return 4;
    endcase
  endfunction

  // multiplicand sub-word met by part q
  function automatic int segq(pm_mode_e md, int q);
    case (md)
      MODE_PMADD32:   return 1 - q;
      MODE_PMADD16:   return (q < 2) ? 1 - q : 5 - q;
      MODE_PMADD16X4: return 3 - q;
      default:        return q;
    endcase
  endfunction

  initial begin
    int digit [R];
    int segr [R];
    for (int it = 0; it < 1200; it++) begin
      int w, rp;
      logic [2*N-1:0] drop_e;
      mode = pm_mode_e'(it % NUM_MODES);
      case ((it / NUM_MODES) % 6)
        0: begin a = '0; b = {$urandom, $urandom}; end
        1: begin a = {4{16'h8000}}; b = {4{16'h8000}}; end
        2: begin a = {4{16'h7fff}}; b = '1; end
        default: begin a = {$urandom, $urandom}; b = {$urandom, $urandom}; end
      endcase
      w  = N / parts(mode);
      rp = w / 2;
      // Booth digits of each row: the part's row l reads bits 2l+1, 2l, 2l-1
      // of the multiplier sub-word it works on (0 below the sub-word)
      for (int j = 0; j < R; j++) begin
        int q, l, base;
        logic x2, x1, x0;
        q = j / rp; l = j % rp;
        segr[j] = segq(mode, q);
        base = segr[j] * w;
        x2 = b[base + 2*l + 1];
        x1 = b[base + 2*l];
        x0 = (l == 0) ? 1'b0 : b[base + 2*l - 1];
        digit[j] = -2 * int'(x2) + int'(x1) + int'(x0);
        sel[j].one = (digit[j] == 1 || digit[j] == -1);
        sel[j].two = (digit[j] == 2 || digit[j] == -2);
        sel[j].neg = (digit[j] < 0);
      end
      #1;
      drop_e = '0;
      for (int j = 0; j < R; j++) begin
        logic signed [2*N+1:0] av, v, body, e;
        logic dropped, sbar;
        int wt;
        av = '0;
        for (int i = 0; i < 2 * N + 2; i++)
          av[i] = (i < w) ? a[segr[j]*w + i] : a[segr[j]*w + w - 1];
        wt   = 2 * j + segr[j] * w;
        body = av * digit[j] - (digit[j] < 0 ? 1 : 0);
        sbar = (body >= 0);
        dropped = !(mode inside {MODE_PMADD32, MODE_PMADD16, MODE_PMADD16X4}) && (j % rp == rp - 1);
        // value of the row's own cells: body + 2^W * (s + S-bar) with the
        // s part folded into body's two's complement bits
        v = body + (1 <<< w) - ((dropped && sbar) ? (1 <<< w) : 0);
        e = v <<< wt;
        if (dropped && sbar) drop_e |= 128'h1 << (wt + w);
        if (j > 0 && segr[j-1] <= segr[j] && digit[j-1] < 0)
          e += 1 <<< (2 * (j - 1) + segr[j-1] * w);
        checks++;
        if (rows[j] != e[2*N-1:0]) begin
          failures++;
          if (failures < 10) $display("ERROR mode %0d row %0d: %h vs %h", mode, j, rows[j], e[2*N-1:0]);
        end
      end
      checks++;
      if (sbar_drop != drop_e) begin
        failures++;
        if (failures < 10) $display("ERROR mode %0d sbar_drop %h vs %h", mode, sbar_drop, drop_e);
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
