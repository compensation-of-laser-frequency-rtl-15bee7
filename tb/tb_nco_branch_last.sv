// tb_nco_branch_last: cycle-by-cycle check of the DPLL feedback loop with P = 8.
//
// Random blocks of phases and magnitudes (one per clock, with idle cycles mixed in) are
// compared against a reference model of the loop written directly from the phase-error
// equations: the estimates rho of a block use the NCO phase of the cycle in which the block
// arrives; one cycle later the accumulator advances by the sum over the block of
// (phi - psi_{n-1}) mod pi/2 minus rho, modulo 2^(N_PSI+N_K). Checked each cycle: the
// accumulator, psi_{n-1}, the demodulated phases, the registered estimates and the phase of
// the last lane.
module tb_nco_branch_last;
  localparam int P = 8, N_PSI = 7, N_R = 11, N_K = 6;
  localparam int W = N_PSI + N_K;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [N_PSI-3:0] phi [P];
  logic [N_R-1:0]   r   [P];
  logic [N_R-1:0]   rl = 11'd640, ru = 11'd1036;
  logic [W-1:0]     acc, acc_next;
  logic [N_PSI-1:0] psi_prev, psi_last;
  logic [N_PSI-3:0] dem [P], rho_q [P];
  int checks = 0, failures = 0;

  nco_branch_last #(.P(P), .N_PSI(N_PSI), .N_R(N_R), .N_K(N_K)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .phi_in(phi), .r_in(r),
    .rho_l(rl), .rho_u(ru), .acc(acc), .psi_prev(psi_prev), .dem(dem), .rho_q(rho_q),
    .acc_next(acc_next), .psi_last(psi_last));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int est(int ph, int psi7, int mag);
    int th = (ph - psi7) & 31;
    if (mag > 640 && mag < 1036) return (th <= 16) ? 7 : 25;
    return 16;
  endfunction

  int a_ref;             // model accumulator
  int phi_m [P];         // model: registered block
  int rho_m [P];

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  initial begin
    int mags [4] = '{396, 885, 1188, 700};
    int psi_ref, sum, a_next;
    a_ref = 0;
    for (int k = 0; k < P; k++) begin
      phi_m[k] = 0; rho_m[k] = 0; phi[k] = '0; r[k] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      // Compare the state registered at the last edge.
      psi_ref = a_ref >> N_K;
      check("acc", int'(acc), a_ref);
      check("psi_prev", int'(psi_prev), psi_ref);
      sum = a_ref;
      for (int k = 0; k < P; k++) begin
        check("dem", int'(dem[k]), (phi_m[k] - psi_ref) & 31);
        check("rho_q", int'(rho_q[k]), rho_m[k]);
        sum += ((phi_m[k] - psi_ref) & 31) - rho_m[k];
      end
      a_next = sum & ((1 << W) - 1);
      check("acc_next", int'(acc_next), a_next);
      check("psi_last", int'(psi_last), a_next >> N_K);
      // New block.
      in_valid = ($urandom % 8) != 0;
      for (int k = 0; k < P; k++) begin
        phi[k] = 5'($urandom);
        r[k]   = 11'(mags[$urandom % 4] + int'($urandom % 40) - 20);
      end
      @(posedge clk);
      if (in_valid) begin
        a_ref = a_next;
        for (int k = 0; k < P; k++) begin
          rho_m[k] = est(int'(phi[k]), psi_ref, int'(r[k]));
          phi_m[k] = int'(phi[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
