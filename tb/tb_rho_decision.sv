// tb_rho_decision: exhaustive check of the symbol-phase decision block F_k.
//
// Sweeps every phase code, every NCO-phase complement and magnitudes below, on and above
// both ring bounds. The expected demodulated phase is (phi + psi_bar) mod 32 and the
// expected estimate is the hand-rounded 5-bit code of atan(1/3) = 6.55 -> 7, pi/4 = 16 or
// atan(3) = 25.45 -> 25, chosen by the ring and the pi/4 comparison.
module tb_rho_decision;
  localparam int N_PSI = 7;
  localparam int N_R   = 11;

  logic [N_PSI-3:0] phi, psib, th, rho;
  logic [N_R-1:0]   r, rl, ru;
  int checks = 0, failures = 0;

  rho_decision #(.N_PSI(N_PSI), .N_R(N_R)) dut (
    .phi_tilde(phi), .psi_bar_q(psib), .r_mag(r), .rho_l(rl), .rho_u(ru),
    .theta_hat(th), .rho(rho));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mags [8];
    int exp_th, exp_rho;
    rl = 11'd640;
    ru = 11'd1036;
    mags = '{0, 396, 639, 640, 641, 885, 1035, 1036};
    for (int a = 0; a < 32; a++)
      for (int c = 0; c < 32; c++)
        for (int i = 0; i < 9; i++) begin
          phi  = 5'(a);
          psib = 5'(c);
          r    = (i < 8) ? 11'(mags[i]) : 11'd1188;
          #1;
          exp_th = (a + c) % 32;
          if (r > rl && r < ru) exp_rho = (exp_th <= 16) ? 7 : 25;
          else                  exp_rho = 16;
          checks++;
          if (th != 5'(exp_th) || rho != 5'(exp_rho)) begin
            failures++;
            if (failures < 10)
              $display("mismatch phi=%0d psib=%0d r=%0d: th=%0d rho=%0d expected %0d %0d",
                       a, c, r, th, rho, exp_th, exp_rho);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
