// vss_node_unit_tb: random check-node states (sorted minima, indices that
// sometimes name the variable node under test), signs, LLRs and edge
// enables, in first and later iterations. The expected messages, the
// a-posteriori value, the extrinsic value, the hard decision and the
// updated check states (three smallest magnitudes found by repeated
// minimum search, sign product, syndrome bit) are computed here.
module vss_node_unit_tb;
  import bicm_pkg::*;
  logic [IDX_W-1:0] n;
  logic first_iter;
  logic signed [LLR_W-1:0] llr;
  logic [2:0] edge_en;
  cn_t cn_in [3], cn_out [3];
  logic [2:0] sgn_in, sgn_out;
  logic hd_in, hd_out;
  logic signed [EXT_W-1:0] ext;
  logic signed [LLR_W+2:0] t_n;
  int checks = 0, failures = 0;
  vss_node_unit dut (.*);

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 8) $display("FAIL: %s", s); end
  endtask

  initial begin
    for (int k = 0; k < 5000; k++) begin
      int em [3];
      int t, ex;
      n = IDX_W'($urandom_range(0, 1000));
      first_iter = ($urandom_range(0, 3) == 0);
      llr = LLR_W'($urandom_range(0, 255));
      edge_en = 3'($urandom_range(1, 7));
      sgn_in = 3'($urandom);
      hd_in = 1'($urandom);
      for (int e = 0; e < 3; e++) begin
        int m [3];
        m[0] = $urandom_range(0, 127);
        m[1] = m[0] + $urandom_range(0, 127 - m[0]);
        m[2] = m[1] + $urandom_range(0, 127 - m[1]);
        cn_in[e].m0 = 7'(m[0]); cn_in[e].m1 = 7'(m[1]); cn_in[e].m2 = 7'(m[2]);
        cn_in[e].p0 = ($urandom_range(0, 3) == 0) ? n : IDX_W'(1001 + 3 * e);
        cn_in[e].p1 = ($urandom_range(0, 3) == 0 && cn_in[e].p0 != n) ? n : IDX_W'(1002 + 3 * e);
        cn_in[e].p2 = ($urandom_range(0, 3) == 0 && cn_in[e].p0 != n && cn_in[e].p1 != n) ? n : IDX_W'(1003 + 3 * e);
        cn_in[e].alpha = 1'($urandom);
        cn_in[e].par = 1'($urandom);
      end
      #1;
      // messages
      t = int'(llr);
      for (int e = 0; e < 3; e++) begin
        int mg;
        mg = (cn_in[e].p0 == n) ? int'(cn_in[e].m1) : int'(cn_in[e].m0);
        mg = (3 * mg) / 4;
        em[e] = (first_iter || !edge_en[e]) ? 0 : ((cn_in[e].alpha != sgn_in[e]) ? -mg : mg);
        t += em[e];
      end
      ex = t - int'(llr);
      ex = (ex > 31) ? 31 : ((ex < -32) ? -32 : ex);
      check(int'(t_n) == t, "a-posteriori value");
      check(int'(ext) == ex, "extrinsic");
      check(hd_out == (t < 0), "hard decision");
      for (int e = 0; e < 3; e++) begin
        if (!edge_en[e]) begin
          check(cn_out[e] == cn_in[e], "disabled edge keeps state");
          check(sgn_out[e] == sgn_in[e], "disabled edge keeps sign");
        end else begin
          int tm, am;
          int cm [$];
          int cp [$];
          int om [3];
          int op [3];
          cm.delete(); cp.delete();
          tm = t - em[e];
          am = (tm < 0) ? -tm : tm;
          if (am > 127) am = 127;
          if (cn_in[e].p0 != n) begin cm.push_back(cn_in[e].m0); cp.push_back(cn_in[e].p0); end
          if (cn_in[e].p1 != n) begin cm.push_back(cn_in[e].m1); cp.push_back(cn_in[e].p1); end
          if (cn_in[e].p2 != n) begin cm.push_back(cn_in[e].m2); cp.push_back(cn_in[e].p2); end
          cm.push_back(am); cp.push_back(int'(n));
          for (int s = 0; s < 3; s++) begin
            if (cm.size() == 0) begin
              om[s] = 127; op[s] = int'(IDX_NONE);
            end else begin
              int bi;
              bi = 0;
              for (int j = 1; j < cm.size(); j++) if (cm[j] < cm[bi]) bi = j;
              om[s] = cm[bi]; op[s] = cp[bi];
              cm.delete(bi); cp.delete(bi);
            end
          end
          check(int'(cn_out[e].m0) == om[0] && int'(cn_out[e].m1) == om[1] &&
                int'(cn_out[e].m2) == om[2], $sformatf("three minima %0d %0d %0d / %0d %0d %0d in %0d %0d %0d p %0d %0d %0d n %0d", cn_out[e].m0, cn_out[e].m1, cn_out[e].m2, om[0], om[1], om[2], cn_in[e].m0, cn_in[e].m1, cn_in[e].m2, cn_in[e].p0, cn_in[e].p1, cn_in[e].p2, n));
          check(int'(cn_out[e].p0) == op[0] || om[0] == om[1], "index of first minimum");
          check(cn_out[e].alpha == (cn_in[e].alpha ^ sgn_in[e] ^ (tm < 0)), "sign product");
          check(sgn_out[e] == (tm < 0), "edge sign");
          check(cn_out[e].par == (cn_in[e].par ^ hd_in ^ (t < 0)), "syndrome bit");
        end
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
