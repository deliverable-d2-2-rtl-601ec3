// channel_emulator_tb: statistical checks of the channel emulator.
//   * erasure = 307/2048 (15 %): the fraction of components with rho = 0
//     must be 15 % +- 1.5 %, and 0 with erasure = 0;
//   * the mean of rho^2 must be 1.0 +- 8 % (Rayleigh normalisation);
//   * at snr = 127 (31.75 dB, noise sigma ~1.2) y must equal rho*x/256 within +-6;
//   * at snr = 0 the noise y - rho*x/256 must have variance
//     64^2/2 = 2048 +- 15 % and mean near 0;
//   * outputs follow inputs after one cycle.
module channel_emulator_tb;
  import bicm_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [6:0] snr = 0;
  logic [10:0] erasure = 0;
  logic signed [9:0] x_i = 0, x_q = 0;
  logic signed [8:0] y_i, y_q;
  logic [7:0] rho_i, rho_q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  channel_emulator dut (.*);

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  // run n cells, return statistics
  task automatic run(input int n, output real er_frac, output real rho2,
                     output real nmean, output real nvar, output int maxdev);
    int er = 0;
    real s2 = 0, sn = 0, sn2 = 0;
    maxdev = 0;
    for (int k = 0; k < n; k++) begin
      int xi, xq, ni, nq;
      xi = ($urandom_range(0, 1) ? 246 : -71);
      xq = ($urandom_range(0, 1) ? -246 : 71);
      in_valid = 1; x_i = 10'(xi); x_q = 10'(xq);
      @(negedge clk);
      if (!out_valid) failures++;
      er += int'(rho_i == 0) + int'(rho_q == 0);
      s2 += real'(rho_i) * rho_i / 4096.0 + real'(rho_q) * rho_q / 4096.0;
      ni = int'(y_i) - ((xi * int'(rho_i)) >>> 8);
      nq = int'(y_q) - ((xq * int'(rho_q)) >>> 8);
      sn += ni + nq;
      sn2 += real'(ni) * ni + real'(nq) * nq;
      if (ni > maxdev) maxdev = ni; if (-ni > maxdev) maxdev = -ni;
      if (nq > maxdev) maxdev = nq; if (-nq > maxdev) maxdev = -nq;
    end
    in_valid = 0;
    er_frac = real'(er) / (2.0 * n);
    rho2 = s2 / (2.0 * n);
    nmean = sn / (2.0 * n);
    nvar = sn2 / (2.0 * n) - nmean * nmean;
  endtask

  initial begin
    real ef, r2, nm, nv;
    int md;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    erasure = 11'd307; snr = 7'd127;
    run(20000, ef, r2, nm, nv, md);
    $display("erasure %f rho2 %f maxdev %0d", ef, r2, md);
    check(ef > 0.135 && ef < 0.165, "erasure fraction 15%");
    check(md <= 6, "high SNR: y = rho*x");

    erasure = 0; snr = 7'd127;
    run(20000, ef, r2, nm, nv, md);
    $display("erasure %f rho2 %f", ef, r2);
    check(ef < 0.001, "no erasures");
    check(r2 > 0.92 && r2 < 1.08, "E[rho^2] = 1");

    erasure = 0; snr = 0;
    run(20000, ef, r2, nm, nv, md);
    $display("noise mean %f var %f", nm, nv);
    check(nv > 2048 * 0.85 && nv < 2048 * 1.15, "noise variance at 0 dB");
    check(nm > -3.0 && nm < 3.0, "noise mean");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
