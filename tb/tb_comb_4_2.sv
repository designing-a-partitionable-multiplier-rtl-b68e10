// tb_comb_4_2: random and all-ones inputs; sum + carry must equal the sum of
// the four inputs modulo 2^W.
module tb_comb_4_2;
  localparam int W = 128;
  logic [W-1:0] x1, x2, x3, x4, sum, carry;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  comb_4_2 dut (.x1, .x2, .x3, .x4, .sum, .carry);

  always #5 clk = ~clk;

  function automatic logic [W-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    for (int it = 0; it < 2000; it++) begin
      x1 = (it == 0) ? '1 : rnd();
      x2 = (it == 0) ? '1 : rnd();
      x3 = (it == 0) ? '1 : rnd();
      x4 = (it == 0) ? '1 : rnd();
      #1;
      checks++;
      if (sum + carry != x1 + x2 + x3 + x4) begin
        failures++;
        $display("ERROR %h %h %h %h", x1, x2, x3, x4);
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
