// tb_phase_derotator: random blocks of phases, magnitudes and NCO phases; the outputs one
// cycle later must be (theta - psi) mod 128 and the unchanged magnitude, and hold during
// idle cycles; out_valid must follow in_valid by one cycle.
module tb_phase_derotator;
  localparam int P = 4;
  logic clk = 0, rst_n = 0, iv = 0, ov;
  logic [6:0]  th [P], ps [P], to [P];
  logic [10:0] r [P], ro [P];
  int checks = 0, failures = 0;
  int exp_t [P], exp_r [P];

  phase_derotator #(.P(P), .N_PSI(7), .N_R(11)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(iv), .theta(th), .r_mag(r), .psi(ps),
    .out_valid(ov), .theta_out(to), .r_out(ro));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit last_iv = 0;
    for (int k = 0; k < P; k++) begin
      exp_t[k] = 0; exp_r[k] = 0; th[k] = '0; ps[k] = '0; r[k] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      checks++;
      if (ov != last_iv) failures++;
      for (int k = 0; k < P; k++) begin
        checks += 2;
        if (int'(to[k]) != exp_t[k]) failures++;
        if (int'(ro[k]) != exp_r[k]) failures++;
      end
      iv = ($urandom % 4) != 0;
      for (int k = 0; k < P; k++) begin
        th[k] = 7'($urandom); ps[k] = 7'($urandom); r[k] = 11'($urandom);
      end
      @(posedge clk);
      last_iv = iv;
      if (iv)
        for (int k = 0; k < P; k++) begin
          exp_t[k] = (int'(th[k]) - int'(ps[k]) + 128) % 128;
          exp_r[k] = int'(r[k]);
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
