// tb_qam16_slicer: random check of the 16-QAM slicer against a brute-force search.
//
// For random samples and unit amplitudes, the expected decision is the nearest of the 16
// grid points found by trying all of them; the squared distance must equal the minimum, and
// the level indices must match wherever the nearest point is unique.
module tb_qam16_slicer;
  localparam int WX = 13, WU = 11;
  logic signed [WX-1:0]   x, y;
  logic        [WU-1:0]   u;
  logic        [1:0]      ii, iq;
  logic signed [WX+2:0]   xh, yh;
  logic        [2*WX+5:0] d2;
  int checks = 0, failures = 0;

  qam16_slicer #(.WX(WX), .WU(WU)) dut (.x(x), .y(y), .unit(u), .idx_i(ii), .idx_q(iq),
                                        .x_hat(xh), .y_hat(yh), .dist2(d2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint best, d;
    int bi, bq, nbest;
    for (int t = 0; t < 3000; t++) begin
      u = (t < 1500) ? 11'd280 : 11'(1 + $urandom % 600);
      x = WX'(int'($urandom % 4001) - 2000);
      y = WX'(int'($urandom % 4001) - 2000);
      if (t < 20) x = WX'(2 * int'(u) * ((t % 3) - 1));   // on the thresholds
      #1;
      best = -1;
      nbest = 0;
      for (int a = 0; a < 4; a++)
        for (int b = 0; b < 4; b++) begin
          automatic longint dx = longint'(x) - longint'((2 * a - 3) * int'(u));
          automatic longint dy = longint'(y) - longint'((2 * b - 3) * int'(u));
          d = dx * dx + dy * dy;
          if (best < 0 || d < best) begin
            best = d; bi = a; bq = b; nbest = 1;
          end else if (d == best) nbest++;
        end
      checks++;
      if (longint'(d2) != best) begin
        failures++;
        $display("x=%0d y=%0d u=%0d: dist %0d expected %0d", x, y, u, d2, best);
      end
      if (nbest == 1) begin
        checks += 3;
        if (ii != 2'(bi) || iq != 2'(bq)) failures++;
        if (int'(xh) != (2 * bi - 3) * int'(u)) failures++;
        if (int'(yh) != (2 * bq - 3) * int'(u)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
