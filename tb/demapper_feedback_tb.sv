// demapper_feedback_tb: random distance vectors and extrinsic values; the
// expected LLR is worked out from the bit-wise max-log definition: for each
// hypothesis of the target bit, the best metric over the two points that
// carry it, where a point gains ext when its other bit is 0.
module demapper_feedback_tb;
  import bicm_pkg::*;
  ecd_vec_t ecd;
  logic signed [5:0] ext;
  logic tgt_bit;
  logic signed [7:0] llr;
  int checks = 0, failures = 0;
  demapper_feedback dut (.*);

  initial begin
    for (int k = 0; k < 4000; k++) begin
      int d [4];
      int x, t, h0, h1, e;
      for (int p = 0; p < 4; p++) begin
        d[p] = (k < 2000) ? $urandom_range(0, 60) : $urandom_range(0, 511);
        ecd[p] = 9'(d[p]);
      end
      x = $urandom_range(0, 63) - 32;
      ext = 6'(x);
      t = $urandom_range(0, 1);
      tgt_bit = 1'(t);
      #1;
      // metric of point with target bit value a and other bit value b
      begin
        int pt [2][2];
        int mt [2][2];
        // label = (b1 b0); target bit t, other bit 1-t
        for (int a = 0; a < 2; a++)
          for (int b = 0; b < 2; b++) begin
            pt[a][b] = (t == 0) ? (a + 2 * b) : (b + 2 * a);
            mt[a][b] = -d[pt[a][b]] + ((b == 0) ? x : 0);
          end
        h0 = (mt[0][0] > mt[0][1]) ? mt[0][0] : mt[0][1];
        h1 = (mt[1][0] > mt[1][1]) ? mt[1][0] : mt[1][1];
      end
      e = h0 - h1;
      if (e > 127) e = 127;
      if (e < -128) e = -128;
      checks++;
      if (int'(llr) != e) begin
        failures++;
        if (failures < 5) $display("FAIL t=%0d ext=%0d d=%0d,%0d,%0d,%0d got %0d exp %0d", t, x, d[0], d[1], d[2], d[3], llr, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
