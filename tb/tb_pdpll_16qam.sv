// tb_pdpll_16qam: the parallel DPLL at its default size (P = 80, 7-bit phases, 11-bit
// magnitudes, Kp = 2^-6) on a synthetic 16-QAM stream.
//
// The stream has a carrier frequency offset of 4 MHz, a sinusoidal frequency modulation of
// 4 MHz peak at 2 MHz and small magnitude noise, at 32 GBd. Checked:
//   - every lane phase of every block against a reference model of the unrolled loop;
//   - out_valid exactly one cycle after in_valid (loop latency of one block);
//   - lock: after the first 40 blocks, the demodulated phase reduced modulo pi/2 is within
//     4 phase codes of the transmitted symbol's first-quadrant phase for >= 97 % of symbols;
//   - each branch of the symbol-phase decision (outer/inner ring, middle ring below and
//     above pi/4) and an idle cycle occur.
module tb_pdpll_16qam;
  localparam int P = 80, N_PSI = 7, N_R = 11, N_K = 6;
  localparam int W = N_PSI + N_K;
  localparam int NBLK = 150;
  localparam real PI_R = 3.14159265358979323846;
  localparam real TWO_PI = 2.0 * PI_R;
  localparam real SCALE = 280.0;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [N_PSI-1:0] theta [P];
  logic [N_R-1:0]   r     [P];
  logic             out_valid;
  logic [N_PSI-1:0] psi   [P];
  int checks = 0, failures = 0;

  pdpll_16qam dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .theta(theta), .r_mag(r),
    .rho_l(11'd640), .rho_u(11'd1036), .out_valid(out_valid), .psi(psi));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  // Model state.
  int  a_ref = 0;
  int  phi_m [P], rho_m [P];
  real zeta_m [P], th_m [P];
  int  cnt_diag = 0, cnt_a0 = 0, cnt_a1 = 0, cnt_idle = 0;
  int  lock_n = 0, lock_ok = 0;
  bit  prev_valid = 0;

  function automatic int est(int ph, int psi7, int mag);
    int th = (ph - psi7) & 31;
    if (mag > 640 && mag < 1036) return (th <= 16) ? 7 : 25;
    return 16;
  endfunction

  initial begin
    real phase = 0.0, fc = 4.0e6, ap = 4.0e6, dfc = 2.0e6, t_sym = 1.0 / 32.0e9;
    real zeta [P], thr [P];
    int  psi_ref, psi_in, sum, a_pend, a_lane, blk = 0, n = 0;
    for (int k = 0; k < P; k++) begin
      phi_m[k] = 0; rho_m[k] = 0; theta[k] = '0; r[k] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (blk < NBLK) begin
      @(negedge clk);
      // Check the outputs for the block registered at the last edge.
      check("out_valid", int'(out_valid), int'(prev_valid));
      psi_in = a_ref >> N_K;    // phase seen by the estimates of the next block
      psi_ref = a_ref >> N_K;
      sum = a_ref;
      for (int k = 0; k < P; k++) begin
        real e;
        sum += ((phi_m[k] - psi_ref) & 31) - rho_m[k];
        a_lane = sum & ((1 << W) - 1);
        if (out_valid) begin
          check("psi", int'(psi[k]), a_lane >> N_K);
          if (blk > 40) begin
            // Phase error modulo pi/2 in phase codes.
            e = (th_m[k] - real'(psi[k]) * TWO_PI / 128.0 - zeta_m[k]) / (PI_R / 2.0);
            e = (e - $floor(e + 0.5)) * 32.0;
            lock_n++;
            if (e < 4.0 && e > -4.0) lock_ok++;
          end
        end
      end
      a_pend = sum & ((1 << W) - 1);   // accumulator after the next valid edge
      // Next block (an idle cycle every 16 cycles).
      in_valid = (blk % 16) != 7 || !prev_valid;
      if (!in_valid) cnt_idle++;
      if (in_valid) begin
        for (int k = 0; k < P; k++) begin
          automatic int i = 2 * int'($urandom % 4) - 3, q = 2 * int'($urandom % 4) - 3;
          automatic real mag = SCALE * $sqrt(real'(i * i + q * q)) + real'(int'($urandom % 21) - 10);
          real ph;
          zeta[k] = $atan2(real'(q), real'(i));
          phase = phase + TWO_PI * t_sym * fc;
          ph = zeta[k] + phase + (ap / dfc) * $sin(TWO_PI * t_sym * dfc * real'(n));
          n++;
          thr[k] = ph;
          ph = ph / TWO_PI;
          theta[k] = 7'($rtoi($floor((ph - $floor(ph)) * 128.0 + 0.5)) % 128);
          r[k] = 11'($rtoi(mag));
        end
        blk++;
      end
      @(posedge clk);
      prev_valid = in_valid;
      if (in_valid) begin
        a_ref = a_pend;
        for (int k = 0; k < P; k++) begin
          rho_m[k] = est(int'(theta[k][4:0]), psi_in, int'(r[k]));
          phi_m[k] = int'(theta[k][4:0]);
          zeta_m[k] = zeta[k];
          th_m[k] = real'(theta[k]) * TWO_PI / 128.0;
          if (rho_m[k] == 16) cnt_diag++;
          else if (rho_m[k] == 7) cnt_a0++;
          else cnt_a1++;
        end
      end
    end
    @(negedge clk);
    check("last out_valid", int'(out_valid), 1);
    $display("decisions: pi/4 %0d, atan(1/3) %0d, atan(3) %0d; idle cycles %0d",
             cnt_diag, cnt_a0, cnt_a1, cnt_idle);
    $display("locked symbols %0d of %0d", lock_ok, lock_n);
    checks += 5;
    if (cnt_diag == 0 || cnt_a0 == 0 || cnt_a1 == 0 || cnt_idle == 0) failures++;
    if (lock_n == 0 || real'(lock_ok) < 0.97 * real'(lock_n)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
