// tb_csa_tree: random and corner-case check of the carry-save adder tree.
//
// Two instances (3 and 82 operands of 13 bits, the sizes of the smallest and the largest
// DPLL branch) are fed random and all-ones operands; the expected result is the plain sum
// of the operands modulo 2^13.
module tb_csa_tree;
  localparam int W = 13;
  logic [W-1:0] a3  [3];
  logic [W-1:0] a82 [82];
  logic [W-1:0] s3, s82;
  int checks = 0, failures = 0;

  csa_tree #(.N_OPS(3),  .W(W)) dut3  (.ops(a3),  .sum(s3));
  csa_tree #(.N_OPS(82), .W(W)) dut82 (.ops(a82), .sum(s82));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e3, e82;
    for (int t = 0; t < 500; t++) begin
      e3 = 0;
      e82 = 0;
      for (int i = 0; i < 3; i++) begin
        a3[i] = (t == 0) ? '1 : W'($urandom);
        e3 += int'(a3[i]);
      end
      for (int i = 0; i < 82; i++) begin
        a82[i] = (t == 0) ? '1 : (t < 250 ? W'($urandom) : W'($urandom % 32));
        e82 += int'(a82[i]);
      end
      #1;
      checks += 2;
      if (s3 != W'(e3)) begin
        failures++;
        $display("3-operand sum %0d expected %0d", s3, W'(e3));
      end
      if (s82 != W'(e82)) begin
        failures++;
        $display("82-operand sum %0d expected %0d", s82, W'(e82));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
