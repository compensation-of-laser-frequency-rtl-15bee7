// tb_cpr_top_full: end-to-end run of the two-stage carrier recovery at its default size
// (P = 80 lanes, 7-bit phases, 11-bit magnitudes, Kp = 2^-6, B = 32, M = 21).
//
// A 16-QAM stream at 32 GBd is impaired by a 4 MHz carrier frequency offset, a sinusoidal
// frequency modulation of 4 MHz peak at 2 MHz (the vibration model), Wiener laser phase
// noise (linewidth x symbol time = 1e-5), small additive phase noise and magnitude noise,
// and fed in polar form, one block per clock with an idle cycle now and then. Checked:
//   - the first decisions appear exactly 6 cycles after the first block;
//   - after the loops have settled, the decided symbols equal the transmitted ones up to one
//     fixed rotation by a multiple of pi/2 (the ambiguity any blind 16-QAM recovery has),
//     with a symbol error rate below 1 % and at most one error in any block;
//   - mechanisms, each counted and required at least once: all three symbol-phase estimates
//     of the DPLL, a DPLL phase wrapping through 2*pi while tracking the frequency, a BPS
//     test phase other than zero, and an idle input cycle.
module tb_cpr_top_full;
  localparam int P = 80;
  localparam int NBLK = 120;
  localparam int SETTLE = 40;
  localparam real PI_R = 3.14159265358979323846;
  localparam real TWO_PI = 2.0 * PI_R;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [6:0]  theta [P], psi_dpll [P], theta_out [P];
  logic [10:0] r_mag [P], r_out [P];
  logic [1:0]  sym_i [P], sym_q [P];
  logic        dpll_valid, out_valid;
  int checks = 0, failures = 0;

  cpr_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .theta(theta), .r_mag(r_mag),
    .rho_l(11'd640), .rho_u(11'd1036), .qam_unit(11'd280),
    .psi_dpll(psi_dpll), .dpll_valid(dpll_valid), .out_valid(out_valid),
    .theta_out(theta_out), .r_out(r_out), .sym_i(sym_i), .sym_q(sym_q));

  always #5 clk = ~clk;

  initial begin
    repeat (NBLK * 2 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Transmitted symbols per block, as level indices 0..3.
  int tx_i [NBLK][P], tx_q [NBLK][P];
  int cnt_rho [3] = '{0, 0, 0};
  int cnt_wrap = 0, cnt_bps_nz = 0, cnt_idle = 0;

  // Rotate level indices by rot * pi/2: (i, q) -> (-q, i) per step.
  function automatic void rotate(input int rot, inout int li, inout int lq);
    for (int s = 0; s < rot; s++) begin
      int t = li;
      li = 3 - lq;
      lq = t;
    end
  endfunction

  // Mechanism counters, sampled every clock.
  logic [6:0] psi_before = '0;
  always @(posedge clk) if (rst_n) begin
    if (dpll_valid) begin
      for (int k = 0; k < P; k++) begin
        automatic logic [6:0] prev = (k == 0) ? psi_before : psi_dpll[k-1];
        case (int'(dut.u_dpll.u_loop.rho_q[k]))
          7:       cnt_rho[0]++;
          16:      cnt_rho[1]++;
          default: cnt_rho[2]++;
        endcase
        if ((psi_dpll[k] < 7'd16 && prev > 7'd112) || (psi_dpll[k] > 7'd112 && prev < 7'd16))
          cnt_wrap++;
      end
      psi_before <= psi_dpll[P-1];
    end
    if (dut.bps_valid)
      for (int k = 0; k < P; k++) if (dut.psi_2[k] != '0) cnt_bps_nz++;
  end

  initial begin
    real phase = 0.0, pn = 0.0;
    real fc = 4.0e6, ap = 4.0e6, dfc = 2.0e6, t_sym = 1.0 / 32.0e9, lw_t = 1.0e-5;
    int  cyc = 0, sent = 0, got = 0, first_in = -1, first_out = -1;
    int  rot = -1, n = 0, compared = 0, errors = 0, blk_err;
    int  votes [4] = '{0, 0, 0, 0};
    for (int k = 0; k < P; k++) begin theta[k] = '0; r_mag[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (got < NBLK - 1 && cyc < NBLK * 2) begin
      @(negedge clk);
      if (out_valid) begin
        if (first_out < 0) first_out = cyc;
        if (got >= SETTLE) begin
          if (rot < 0) begin
            // Fix the pi/2 ambiguity from the first settled block.
            for (int k = 0; k < P; k++)
              for (int rr = 0; rr < 4; rr++) begin
                automatic int li = tx_i[got][k], lq = tx_q[got][k];
                rotate(rr, li, lq);
                if (li == int'(sym_i[k]) && lq == int'(sym_q[k])) votes[rr]++;
              end
            rot = 0;
            for (int rr = 1; rr < 4; rr++) if (votes[rr] > votes[rot]) rot = rr;
          end
          blk_err = 0;
          for (int k = 0; k < P; k++) begin
            automatic int li = tx_i[got][k], lq = tx_q[got][k];
            rotate(rot, li, lq);
            compared++;
            if (li != int'(sym_i[k]) || lq != int'(sym_q[k])) blk_err++;
          end
          errors += blk_err;
          checks++;                        // at most one symbol error per settled block
          if (blk_err > 1) failures++;
        end
        got++;
      end
      // Next input block; an idle cycle every 32 cycles while sending.
      in_valid = (sent < NBLK) && (cyc % 32 != 17);
      if (sent < NBLK && !in_valid) cnt_idle++;
      if (in_valid) begin
        if (first_in < 0) first_in = cyc;
        for (int k = 0; k < P; k++) begin
          automatic int  li = int'($urandom % 4), lq = int'($urandom % 4);
          automatic real i = real'(2 * li - 3), q = real'(2 * lq - 3);
          automatic real mag = 280.0 * $sqrt(i * i + q * q) + real'(int'($urandom % 21) - 10);
          automatic real u1 = (real'($urandom % 1000000) + 0.5) / 1.0e6;
          automatic real u2 = (real'($urandom % 1000000) + 0.5) / 1.0e6;
          automatic real g  = $sqrt(-2.0 * $ln(u1)) * $cos(TWO_PI * u2);   // N(0,1)
          automatic real ph;
          tx_i[sent][k] = li;
          tx_q[sent][k] = lq;
          phase = phase + TWO_PI * t_sym * fc;
          pn = pn + $sqrt(TWO_PI * lw_t) * g;
          ph = $atan2(q, i) + phase + pn + (ap / dfc) * $sin(TWO_PI * t_sym * dfc * real'(n))
               + 0.02 * g;
          n++;
          ph = ph / TWO_PI;
          theta[k] = 7'($rtoi($floor((ph - $floor(ph)) * 128.0 + 0.5)) % 128);
          r_mag[k] = 11'($rtoi(mag));
        end
        sent++;
      end
      @(posedge clk);
      cyc++;
    end
    $display("first block in cycle %0d, first decisions in cycle %0d", first_in, first_out);
    $display("rotation %0d x pi/2; %0d symbol errors in %0d", rot, errors, compared);
    $display("DPLL estimates atan(1/3) %0d, pi/4 %0d, atan(3) %0d; DPLL wraps %0d; nonzero BPS phases %0d; idle cycles %0d",
             cnt_rho[0], cnt_rho[1], cnt_rho[2], cnt_wrap, cnt_bps_nz, cnt_idle);
    checks++;
    if (first_out - first_in != 6) failures++;
    checks++;
    if (compared < P * (NBLK - SETTLE - 10) || real'(errors) > 0.01 * real'(compared)) failures++;
    for (int j = 0; j < 3; j++) begin
      checks++;
      if (cnt_rho[j] == 0) failures++;
    end
    checks += 3;
    if (cnt_wrap == 0) failures++;
    if (cnt_bps_nz == 0) failures++;
    if (cnt_idle == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
