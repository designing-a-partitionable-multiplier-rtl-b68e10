// tb_csa_array: an 11-row array (the largest of the design) with random and
// all-ones rows; sum + carry must equal the sum of all rows modulo 2^W.
module tb_csa_array;
  localparam int W = 128;
  localparam int ROWS = 11;
  logic [W-1:0] pp [ROWS];
  logic [W-1:0] sum, carry;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  csa_array #(.W(W), .ROWS(ROWS)) dut (.pp, .sum, .carry);

  always #5 clk = ~clk;

  initial begin
    logic [W-1:0] total;
    for (int it = 0; it < 2000; it++) begin
      total = '0;
      for (int k = 0; k < ROWS; k++) begin
        pp[k] = (it == 0) ? '1 : {$urandom, $urandom, $urandom, $urandom};
        total += pp[k];
      end
      #1;
      checks++;
      if (sum + carry != total) begin
        failures++;
        $display("ERROR iteration %0d", it);
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
