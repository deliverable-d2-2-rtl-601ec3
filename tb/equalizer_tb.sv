// equalizer_tb: random received samples and amplitudes (including erased
// components, rho = 0); each output is compared with 64*y/rho computed in
// real arithmetic, truncated toward zero and clipped to 9 bits, and the
// CSI with rho; the valid latency is one cycle.
module equalizer_tb;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [8:0] y_i = 0, y_q = 0, yeq_i, yeq_q;
  logic [7:0] rho_i = 0, rho_q = 0, csi_i, csi_q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  equalizer dut (.*);

  function automatic int expect_eq(input int y, input int r);
    real v;
    if (r == 0) return 0;
    v = 64.0 * y / r;
    if (v > 255.0) return 255;
    if (v < -256.0) return -256;
    return $rtoi(v);
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      int yi, yq, ri, rq;
      in_valid = 1;
      yi = $urandom_range(0, 511) - 256; yq = $urandom_range(0, 511) - 256;
      ri = ($urandom_range(0, 9) == 0) ? 0 : $urandom_range(1, 255);
      rq = ($urandom_range(0, 9) == 0) ? 0 : $urandom_range(1, 255);
      y_i = 9'(yi); y_q = 9'(yq); rho_i = 8'(ri); rho_q = 8'(rq);
      @(negedge clk);
      checks += 5;
      if (!out_valid) begin failures++; $display("FAIL valid"); end
      if (int'(yeq_i) != expect_eq(yi, ri)) begin failures++; $display("FAIL I y=%0d r=%0d got %0d", yi, ri, yeq_i); end
      if (int'(yeq_q) != expect_eq(yq, rq)) begin failures++; $display("FAIL Q y=%0d r=%0d got %0d", yq, rq, yeq_q); end
      if (int'(csi_i) != ri) begin failures++; $display("FAIL csi_i"); end
      if (int'(csi_q) != rq) begin failures++; $display("FAIL csi_q"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
