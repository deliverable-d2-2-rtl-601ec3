// ldpc_encoder_tb: encodes three random frames of a reduced code (N = 1440,
// K = 1152, 96-column groups) with gaps in the input, and checks for each
// frame the systematic part, every parity-check equation (information
// edges from the code structure plus the staircase p[i-1] ^ p[i]), the
// codeword length and the N-K cycle parity phase with in_ready low.
module ldpc_encoder_tb;
  import bicm_pkg::*;
  localparam int unsigned N = 1440, K = 1152, GRP = 96, M = N - K;
  logic clk = 0, rst_n = 0, in_valid = 0, in_bit = 0;
  logic in_ready, out_valid, out_bit, out_last;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  ldpc_encoder #(.N(N), .K(K), .GRP(GRP)) dut (.*);

  logic info [K];
  logic cw [$];
  int parity_cycles;

  always @(posedge clk) if (rst_n && out_valid) cw.push_back(out_bit);
  always @(posedge clk) if (rst_n && !in_ready) parity_cycles++;

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      int nb;
      cw.delete();
      parity_cycles = 0;
      nb = 0;
      while (nb < K) begin
        in_valid = ($urandom_range(0, 4) != 0);
        in_bit   = 1'($urandom);
        if (in_valid) begin
          check(in_ready, "ready during information phase");
          info[nb] = in_bit;
          nb++;
        end
        @(negedge clk);
      end
      in_valid = 0;
      while (cw.size() < N) @(negedge clk);
      @(negedge clk);
      check(cw.size() == N, $sformatf("codeword length %0d", cw.size()));
      check(parity_cycles == M, $sformatf("parity phase %0d cycles", parity_cycles));
      for (int n = 0; n < K; n++) check(cw[n] == info[n], "systematic bit");
      begin
        logic s [M];
        for (int c = 0; c < M; c++) s[c] = cw[K + c] ^ ((c > 0) ? cw[K + c - 1] : 1'b0);
        for (int n = 0; n < K; n++)
          for (int e = 0; e < 3; e++) s[info_check(n, e, N, K, GRP)] ^= cw[n];
        for (int c = 0; c < M; c++) check(s[c] == 1'b0, $sformatf("check %0d", c));
      end
    end
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
