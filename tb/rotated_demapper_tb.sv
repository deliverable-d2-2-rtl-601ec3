// rotated_demapper_tb: random equalized cells and channel states; the test
// derives the four rotated points from cos/sin of 29 degrees (scale 64,
// rounded), computes each weighted squared distance and its scaled,
// clipped value, and the two max-log LLRs (min distance of the points with
// the bit at 1 minus that with the bit at 0), and compares after the
// one-cycle latency.
module rotated_demapper_tb;
  import bicm_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [8:0] yeq_i = 0, yeq_q = 0;
  logic [7:0] csi_i = 0, csi_q = 0;
  logic [11:0] llr_scale = 0;
  ecd_vec_t ecd;
  logic signed [7:0] llr [2];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  rotated_demapper dut (.*);

  function automatic int coord(input int p, input bit q_axis);
    real a, i0, q0, ang, v;
    a = 1.0 / $sqrt(2.0);
    ang = 29.0 * 3.14159265358979 / 180.0;
    i0 = p[0] ? -a : a;
    q0 = p[1] ? -a : a;
    v = q_axis ? (i0 * $sin(ang) + q0 * $cos(ang)) : (i0 * $cos(ang) - q0 * $sin(ang));
    return int'($rtoi(v * 64.0 + (v >= 0 ? 0.5 : -0.5)));
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      int yi, yq, ci, cq, sc;
      longint d [4];
      int ex [4];
      yi = $urandom_range(0, 200) - 100; yq = $urandom_range(0, 200) - 100;
      ci = ($urandom_range(0, 6) == 0) ? 0 : $urandom_range(20, 120);
      cq = ($urandom_range(0, 6) == 0) ? 0 : $urandom_range(20, 120);
      sc = $urandom_range(16, 1500);
      in_valid = 1; yeq_i = 9'(yi); yeq_q = 9'(yq); csi_i = 8'(ci); csi_q = 8'(cq);
      llr_scale = 12'(sc);
      for (int p = 0; p < 4; p++) begin
        longint a, b;
        a = longint'(ci) * (yi - coord(p, 0));
        b = longint'(cq) * (yq - coord(p, 1));
        d[p] = ((a * a + b * b) * sc) / (longint'(1) << 28);
        ex[p] = (d[p] > 511) ? 511 : int'(d[p]);
      end
      @(negedge clk);
      checks++;
      if (!out_valid) begin failures++; $display("FAIL valid"); end
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (int'(ecd[p]) != ex[p]) begin
          failures++;
          if (failures < 6) $display("FAIL ecd[%0d] got %0d exp %0d", p, ecd[p], ex[p]);
        end
      end
      for (int b = 0; b < 2; b++) begin
        int m0, m1, e;
        m0 = 1 << 20; m1 = 1 << 20;
        for (int p = 0; p < 4; p++)
          if (p[b]) m1 = (ex[p] < m1) ? ex[p] : m1;
          else m0 = (ex[p] < m0) ? ex[p] : m0;
        e = m1 - m0;
        e = (e > 127) ? 127 : ((e < -128) ? -128 : e);
        checks++;
        if (int'(llr[b]) != e) begin
          failures++;
          if (failures < 6) $display("FAIL llr[%0d] got %0d exp %0d", b, llr[b], e);
        end
      end
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
