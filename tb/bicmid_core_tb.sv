// bicmid_core_tb: the iterative receiver core in a reduced configuration
// (N = 1440, K = 1152, 96-column groups, 24 lanes, 8 interleaver columns).
// Codewords are built here from the parity-check structure (three checks
// per information bit, staircase parity), interleaved, mapped to rotated
// QPSK and disturbed by Gaussian noise; the demapper block turns them into
// ECD vectors and LLRs for the core. Checked: decoded bits equal the
// information bits, the K/P output groups come back to back with out_last
// on the last, the decoding time is frame_iters * (N/P) cycles plus a fixed
// offset, noisy frames need more than one iteration and use the feedback
// path, and a frame that arrives while the core is busy is dropped.
module bicmid_core_tb;
  import bicm_pkg::*;
  localparam int unsigned N = 1440, K = 1152, GRP = 96, P = 24, NC = 8, ITER = 15;
  localparam int unsigned NCELL = N / M_BITS, L = N / P;

  logic clk = 0, rst_n = 0;
  logic dm_valid;
  logic signed [YEQ_W-1:0] yi, yq;
  logic [CSI_W-1:0] ci, cq;
  logic [LSC_W-1:0] llr_scale;
  logic in_valid;
  ecd_vec_t in_ecd;
  logic signed [LLR_W-1:0] in_llr [M_BITS];
  logic out_valid, out_last, frame_conv, dropped, bank_swap;
  logic [P-1:0] out_bits;
  logic [4:0] frame_iters;
  logic [$clog2(P+1)-1:0] fb_updates;

  int checks = 0, failures = 0;
  int n_drop = 0, n_multi = 0, n_fb = 0, n_swap = 0;
  logic [K-1:0] info_q [$];
  bit chk_q [$];
  int n_maxit = 0;
  longint cyc = 0, t_in_done [$];
  int offset = -1;

  rotated_demapper dm (.clk, .rst_n, .in_valid(dm_valid), .yeq_i(yi), .yeq_q(yq),
                       .csi_i(ci), .csi_q(cq), .llr_scale, .out_valid(in_valid),
                       .ecd(in_ecd), .llr(in_llr));
  bicmid_core #(.N(N), .K(K), .GRP(GRP), .P(P), .NC(NC), .ITER(ITER)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (dropped) n_drop++;
    if (bank_swap) n_swap++;
    n_fb += int'(fb_updates);
  end

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  function automatic int gauss(input int sd);  // about N(0, sd^2)
    int s = 0;
    for (int k = 0; k < 12; k++) s += $urandom_range(0, 4095);
    return ((s - 6 * 4096) * sd) / 4096;
  endfunction

  // encode random information bits, send one interleaved frame of cells
  task automatic send_frame(input int sd, input bit keep, input bit cmp);
    logic [K-1:0] info;
    logic [N-1:0] cw;
    logic [N-K-1:0] chk;
    chk = '0;
    for (int n = 0; n < K; n++) begin
      info[n] = 1'($urandom);
      cw[n] = info[n];
      if (info[n])
        for (int e = 0; e < 3; e++) chk[info_check(n, e, N, K, GRP)] ^= 1'b1;
    end
    for (int i = 0; i < N - K; i++)
      cw[K + i] = chk[i] ^ ((i == 0) ? 1'b0 : cw[K + i - 1]);
    if (keep) begin info_q.push_back(info); chk_q.push_back(cmp); end
    for (int c = 0; c < NCELL; c++) begin
      int p;
      p = int'(cw[pi_inv(2 * c, N, NC)]) + 2 * int'(cw[pi_inv(2 * c + 1, N, NC)]);
      dm_valid = 1;
      yi = YEQ_W'(sat(pt_i(p, Y_SMALL, Y_LARGE) + gauss(sd), YEQ_W));
      yq = YEQ_W'(sat(pt_q(p, Y_SMALL, Y_LARGE) + gauss(sd), YEQ_W));
      ci = 8'd64; cq = 8'd64;
      @(posedge clk); #1;
    end
    dm_valid = 0;
  endtask

  // output side: compare and time every decoded frame
  initial begin
    forever begin
      @(posedge clk);
      if (out_valid) begin
        logic [K-1:0] exp_info;
        bit chk;
        longint t0;
        int lat;
        exp_info = info_q.pop_front();
        chk = chk_q.pop_front();
        if (!frame_conv) n_maxit++;
        if (!frame_conv) check(frame_iters == 5'(ITER), "unconverged frame ran all iterations");
        t0 = t_in_done.pop_front();
        lat = int'(cyc - t0) - int'(frame_iters) * int'(L);
        if (offset < 0) offset = lat;
        check(lat == offset, $sformatf("decode time: %0d iterations, offset %0d vs %0d", frame_iters, lat, offset));
        if (frame_iters > 1) n_multi++;
        for (int g = 0; g < K / P; g++) begin
          if (g > 0) @(posedge clk);
          check(out_valid, "groups back to back");
          check(out_last == (g == K / P - 1), "out_last on the last group");
          if (chk) check(out_bits == exp_info[g * P +: P], $sformatf("decoded group %0d %h %h", g, out_bits, exp_info[g * P +: P]));
        end
        if (chk) check(frame_conv, "frame converged");
      end
    end
  end
  // time of the last cell of each kept frame entering the core
  int cells_in = 0;
  always @(posedge clk) if (in_valid) begin
    cells_in++;
    if (cells_in == NCELL) begin
      cells_in = 0;
      if (!dropped) t_in_done.push_back(cyc);
    end
  end

  initial begin
    dm_valid = 0; yi = 0; yq = 0; ci = 0; cq = 0;
    llr_scale = 12'd356;   // 2 / sigma^2 for sigma = 0.3, 4 fraction bits
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    send_frame(2, 1, 1);              // nearly noiseless
    repeat (20 * L) @(posedge clk); #1;
    send_frame(19, 1, 1);             // sigma = 0.3
    repeat (20 * L) @(posedge clk); #1;
    send_frame(90, 1, 0);             // far too noisy: runs all iterations
    send_frame(19, 0, 0);             // arrives while decoding: dropped
    repeat (20 * L) @(posedge clk); #1;
    for (int f = 0; f < 3; f++) begin
      send_frame(19, 1, 1);
      repeat (20 * L) @(posedge clk); #1;
    end
    check(info_q.size() == 0, "every kept frame decoded");
    check(n_drop == 1, $sformatf("one frame dropped (%0d)", n_drop));
    check(n_multi > 0, "noisy frames took more than one iteration");
    check(n_fb > 0, "feedback LLR updates happened");
    check(n_maxit == 1, "one frame stopped at the iteration limit");
    check(n_swap == 6, $sformatf("bank swaps (%0d)", n_swap));
    $display("drops=%0d multi_iter_frames=%0d iteration_limit=%0d feedback_updates=%0d swaps=%0d offset=%0d",
             n_drop, n_multi, n_maxit, n_fb, n_swap, offset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
