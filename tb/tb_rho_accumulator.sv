// tb_rho_accumulator: checks -(sum of rho) modulo 2^13 for 80 random 5-bit estimates
// and for the extreme cases all-zero (result 0) and all-31.
module tb_rho_accumulator;
  localparam int N = 80;
  logic [4:0]  rho [N];
  logic [12:0] rb;
  int checks = 0, failures = 0;

  rho_accumulator #(.N(N), .N_PSI(7), .N_K(6)) dut (.rho(rho), .rho_bar(rb));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, e;
    for (int t = 0; t < 300; t++) begin
      s = 0;
      for (int i = 0; i < N; i++) begin
        rho[i] = (t == 0) ? 5'd0 : (t == 1) ? 5'd31 : 5'($urandom);
        s += int'(rho[i]);
      end
      #1;
      e = (8192 - (s % 8192)) % 8192;
      checks++;
      if (int'(rb) != e) begin
        failures++;
        $display("sum %0d: rho_bar %0d expected %0d", s, rb, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
