// tb_bps: blind phase search on 16-QAM blocks with a known residual phase (P = 16 lanes,
// B = 32 test phases, window M = 21).
//
// The samples are ideal 16-QAM points (magnitudes with small noise) rotated by a residual
// phase of +3 phase codes for the first 12 blocks and -5 codes afterwards, quantized to 7
// bits. One sample gets an extra phase kick of +8 codes, which the windowed metric must
// ignore. Checked:
//   - the selected test phase is within one code of the residual phase for every sample
//     whose window lies entirely on one side of the step (the kicked sample included);
//   - theta_d and r_d are the inputs of the block being decided;
//   - out_valid rises exactly 3 cycles after the first in_valid, and stays high while
//     blocks keep arriving.
module tb_bps;
  localparam int P = 16, NB = 24, STEP = 12;
  localparam real PI_R = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, iv = 0;
  logic [6:0]  th [P], tho [P], pso [P];
  logic [10:0] r [P], ro [P];
  logic        ov;
  int checks = 0, failures = 0;

  bps #(.P(P), .N_PSI(7), .N_R(11), .B(32), .M(21)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(iv), .theta(th), .r_mag(r), .unit(11'd280),
    .out_valid(ov), .theta_d(tho), .r_d(ro), .psi_bps(pso));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int th_hist [NB][P];
  int r_hist  [NB][P];

  initial begin
    int cyc = 0, first_ov = -1, got_blk = 0;
    for (int k = 0; k < P; k++) begin th[k] = '0; r[k] = '0; end
    // Stream generation.
    for (int b = 0; b < NB; b++)
      for (int k = 0; k < P; k++) begin
        automatic int  i = 2 * int'($urandom % 4) - 3, q = 2 * int'($urandom % 4) - 3;
        automatic real delta = (b < STEP) ? 3.0 : -5.0;
        automatic real ph = $atan2(real'(q), real'(i)) * 64.0 / PI_R + delta;
        if (b == 5 && k == 7) ph = ph + 8.0;
        th_hist[b][k] = ($rtoi($floor(ph + 0.5)) + 256) % 128;
        r_hist[b][k]  = $rtoi(280.0 * $sqrt(real'(i * i + q * q))) + int'($urandom % 9) - 4;
      end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NB + 4; b++) begin
      @(negedge clk);
      if (ov) begin
        if (first_ov < 0) first_ov = cyc;
        for (int k = 0; k < P; k++) begin
          automatic int n = got_blk * P + k;           // sample index in the stream
          automatic int e = ((got_blk < STEP) ? 3 : -5);
          automatic int g = int'(pso[k]) >= 64 ? int'(pso[k]) - 128 : int'(pso[k]);
          checks += 2;
          if (int'(tho[k]) != th_hist[got_blk][k] || int'(ro[k]) != r_hist[got_blk][k])
            failures++;
          if (n < STEP * P - 10 || n >= STEP * P + 10) begin
            if (g < e - 1 || g > e + 1) begin
              failures++;
              $display("block %0d lane %0d: phase %0d expected %0d", got_blk, k, g, e);
            end
          end
        end
        got_blk++;
      end else if (first_ov >= 0 && b <= NB) begin
        checks++;
        failures++;
        $display("out_valid dropped at cycle %0d", cyc);
      end
      iv = (b < NB);
      if (b < NB)
        for (int k = 0; k < P; k++) begin
          th[k] = 7'(th_hist[b][k]);
          r[k]  = 11'(r_hist[b][k]);
        end
      @(posedge clk);
      cyc++;
    end
    checks += 2;
    if (first_ov != 3) begin
      failures++;
      $display("first out_valid in cycle %0d, expected 3", first_ov);
    end
    if (got_blk != NB - 2) begin
      failures++;
      $display("%0d blocks decided, expected %0d", got_blk, NB - 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
