// tb_csa_3_2: random and corner vectors; sum + carry must equal x + y + z
// modulo 2^W, and sum must be the bitwise parity.
module tb_csa_3_2;
  localparam int W = 128;
  logic [W-1:0] x, y, z, sum, carry;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  csa_3_2 dut (.x, .y, .z, .sum, .carry);

  always #5 clk = ~clk;

  function automatic logic [W-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    for (int it = 0; it < 2000; it++) begin
      x = (it == 0) ? '1 : rnd();
      y = (it == 0) ? '1 : rnd();
      z = (it == 0) ? '1 : rnd();
      #1;
      checks++;
      if (sum + carry != x + y + z || sum != (x ^ y ^ z)) begin
        failures++;
        $display("ERROR x=%h y=%h z=%h", x, y, z);
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
