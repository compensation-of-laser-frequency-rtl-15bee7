// tb_w_branch: checks output branch W_k for k = 0 and k = 9.
//
// Random accumulator, demodulated phases and rho sums; the expected accumulator is
// acc + sum(dem) + rho_bar modulo 2^13 and the expected phase its top 7 bits.
module tb_w_branch;
  logic [12:0] acc, rb0, rb9, o0, o9;
  logic [4:0]  d0 [1];
  logic [4:0]  d9 [10];
  logic [6:0]  p0, p9;
  int checks = 0, failures = 0;

  w_branch #(.K(0), .N_PSI(7), .N_K(6)) dut0 (.acc(acc), .dem(d0), .rho_bar(rb0),
                                              .acc_out(o0), .psi(p0));
  w_branch #(.K(9), .N_PSI(7), .N_K(6)) dut9 (.acc(acc), .dem(d9), .rho_bar(rb9),
                                              .acc_out(o9), .psi(p9));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e0, e9;
    for (int t = 0; t < 400; t++) begin
      acc = 13'($urandom);
      rb0 = 13'($urandom);
      rb9 = 13'($urandom);
      d0[0] = 5'($urandom);
      e0 = int'(acc) + int'(rb0) + int'(d0[0]);
      e9 = int'(acc) + int'(rb9);
      for (int j = 0; j < 10; j++) begin
        d9[j] = 5'($urandom);
        e9 += int'(d9[j]);
      end
      e0 %= 8192;
      e9 %= 8192;
      #1;
      checks += 4;
      if (int'(o0) != e0) failures++;
      if (int'(p0) != e0 / 64) failures++;
      if (int'(o9) != e9) failures++;
      if (int'(p9) != e9 / 64) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
