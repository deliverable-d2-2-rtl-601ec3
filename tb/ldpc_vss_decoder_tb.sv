// ldpc_vss_decoder_tb: self-checking test of the VSS MS3 LDPC decoder on a
// reduced code (N = 1440, K = 1152, 96-column groups, 24 lanes). The test
// encodes random words with its own encoder loop over the code structure,
// feeds channel LLRs and checks the decoded codeword, the convergence flag,
// the iteration count and the latency (iterations * N/P cycles):
//   1. clean, strong LLRs             -> codeword after one iteration
//   2. LLRs with 1% wrong signs, the wrong ones weak -> corrected
//   3. random LLRs (not a codeword)   -> stops at the iteration limit
module ldpc_vss_decoder_tb;
  import bicm_pkg::*;

  localparam int unsigned N = 1440, K = 1152, GRP = 96, P = 24, ITER = 15;
  localparam int unsigned M = N - K, L = N / P;

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, converged, first_iter;
  logic [4:0] iters;
  logic [IDX_W-1:0] lane_n [P];
  logic signed [LLR_W-1:0] lane_llr [P];
  logic signed [EXT_W-1:0] lane_ext [P];
  logic [$clog2(N/P)-1:0] rd_grp;
  logic [P-1:0] rd_bits;

  logic signed [LLR_W-1:0] llr_mem [N];
  logic cw [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ldpc_vss_decoder #(.N(N), .K(K), .GRP(GRP), .P(P), .ITER(ITER)) dut (.*);

  always_comb for (int k = 0; k < P; k++) lane_llr[k] = llr_mem[lane_n[k]];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic make_codeword();
    logic acc [M];
    logic prev;
    for (int c = 0; c < M; c++) acc[c] = 1'b0;
    for (int n = 0; n < K; n++) begin
      cw[n] = 1'($urandom);
      if (cw[n]) for (int e = 0; e < 3; e++) acc[info_check(n, e, N, K, GRP)] ^= 1'b1;
    end
    prev = 1'b0;
    for (int i = 0; i < M; i++) begin
      cw[K + i] = prev ^ acc[i];
      prev = cw[K + i];
    end
  endtask

  // run one decode; returns cycles from start to done
  task automatic decode(output int cycles);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  function automatic int count_errors();
    int errs = 0;
    for (int n = 0; n < N; n++) if (dut.hd_mem[n] != cw[n]) errs++;
    return errs;
  endfunction

  initial begin
    int cyc, errs, flips;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. clean codeword
    make_codeword();
    for (int n = 0; n < N; n++) llr_mem[n] = cw[n] ? -8'sd40 : 8'sd40;
    decode(cyc);
    check(converged, "clean frame converges");
    check(iters == 1, $sformatf("clean frame iterations %0d", iters));
    check(cyc == int'(iters) * L + 1, $sformatf("clean latency %0d", cyc));
    check(count_errors() == 0, "clean frame decoded");

    // 2. noisy codeword
    for (int trial = 0; trial < 3; trial++) begin
      make_codeword();
      flips = 0;
      for (int n = 0; n < N; n++) begin
        int mag;
        mag = 6 + int'($urandom_range(0, 14));
        if ($urandom_range(0, 999) < 10) begin
          mag = 1 + int'($urandom_range(0, 5));
          llr_mem[n] = LLR_W'(cw[n] ? mag : -mag);
          flips++;
        end else begin
          llr_mem[n] = LLR_W'(cw[n] ? -mag : mag);
        end
      end
      decode(cyc);
      errs = count_errors();
      $display("trial %0d: %0d wrong signs, %0d iterations, %0d errors left", trial, flips, iters, errs);
      check(converged, "noisy frame converges");
      check(iters > 1, "noisy frame needs more than one iteration");
      check(cyc == int'(iters) * L + 1, $sformatf("noisy latency %0d", cyc));
      check(errs == 0, "noisy frame corrected");
      // read-out port
      for (int g = 0; g < 3; g++) begin
        rd_grp = ($clog2(N/P))'(g);
        #1;
        for (int k = 0; k < P; k++) check(rd_bits[k] == cw[g * P + k], "read-out bit");
      end
    end

    // 3. random LLRs: no codeword
    for (int n = 0; n < N; n++) llr_mem[n] = LLR_W'($urandom_range(0, 40) - 20);
    decode(cyc);
    check(!converged, "random input does not converge");
    check(iters == ITER, "stops at iteration limit");
    check(cyc == int'(ITER) * L + 1, "limit latency");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
