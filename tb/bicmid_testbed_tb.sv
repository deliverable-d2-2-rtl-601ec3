// bicmid_testbed_tb: end-to-end run of the whole transmitter - channel -
// BICM-ID receiver chain in a reduced configuration (N = 1440, K = 1152,
// 96-column groups, 24 lanes). Three operating points are run one after
// the other, each for several frames:
//   A  Es/N0 = 20 dB, no erasures     -> every frame error free and
//                                        converged, early stop well before
//                                        the iteration limit;
//   B  Es/N0 = 20 dB, 15 % erasures   -> erasure counter near 15 % of all
//                                        components, frames still decoded;
//   C  Es/N0 = 0 dB, 15 % erasures    -> frames hit the iteration limit
//                                        and carry bit errors.
// Each mechanism is counted and a mechanism that never happens counts as a
// failure: early-stopped frames, frames stopped at the iteration limit,
// erased components, extrinsic feedback updates, LLR/ECD bank swaps and
// the signal-space-diversity delay being filled. Frame drops and
// interleaver overruns cannot happen with this transmitter rate (a frame
// takes N cycles to send, far longer than the longest decode) and are
// checked to stay at zero.
module bicmid_testbed_tb;
  import bicm_pkg::*;
  localparam int unsigned N = 1440, K = 1152, GRP = 96, P = 24, NC = 8, ITER = 15;

  logic clk = 0, rst_n = 0, run = 0;
  logic [SNR_W-1:0] snr;
  logic [ERAS_W-1:0] erasure;
  logic [LSC_W-1:0] llr_scale;
  logic [31:0] frames, bit_errors, frame_errors, bits_checked, frames_dropped,
               frames_converged, iter_sum, erased, feedbacks, bank_swaps, frames_sent;
  logic tx_overflow;
  int checks = 0, failures = 0;
  longint comps = 0;

  bicmid_testbed #(.N(N), .K(K), .GRP(GRP), .P(P), .NC(NC), .ITER(ITER), .D(1)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (dut.ch_valid) comps += 2;

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  // LLR scale 2/sigma^2 with 4 fraction bits for Es/N0 = snr/4 dB
  function automatic logic [LSC_W-1:0] scale_for(input int s);
    real v;
    v = 64.0 * (10.0 ** (real'(s) / 40.0));
    return (v > 4095.0) ? 12'hfff : LSC_W'(int'(v));
  endfunction

  task automatic wait_frames(input int nf);
    int target;
    target = int'(frames) + nf;
    while (int'(frames) < target) @(posedge clk);
  endtask

  int f0, e0, c0, i0, fe0;
  longint er0, cm0;
  int n_early = 0, n_limit = 0;
  always @(posedge clk)
    if (dut.core_valid && dut.core_last) begin
      if (dut.core_conv && dut.core_iters < 5'(ITER)) n_early++;
      if (!dut.core_conv) n_limit++;
    end

  initial begin
    snr = 7'd80; erasure = '0; llr_scale = scale_for(80);
    repeat (3) @(posedge clk); #1;
    rst_n = 1; run = 1;

    // ---- A: high SNR, no erasures
    wait_frames(4);
    check(bit_errors == 0, $sformatf("A: bit errors %0d", bit_errors));
    check(frames_converged == frames, "A: every frame converged");
    check(iter_sum < frames * 5, $sformatf("A: early stop (%0d iterations in %0d frames)", iter_sum, frames));
    check(erased == 0, "A: no erasures");
    check(bits_checked == frames * K, "A: bits checked");

    // ---- B: 15 % erasures
    erasure = 11'd307;
    wait_frames(2);                       // frames already on the way
    f0 = int'(frames); e0 = int'(bit_errors); c0 = int'(frames_converged);
    er0 = longint'(erased); cm0 = comps;
    wait_frames(4);
    begin
      real rate;
      rate = real'(longint'(erased) - er0) / real'(comps - cm0);
      $display("B: erased fraction %f", rate);
      check(rate > 0.13 && rate < 0.17, $sformatf("B: erased fraction %f", rate));
      check(int'(bit_errors) == e0, "B: erased frames decoded without errors");
      check(int'(frames_converged) - c0 == int'(frames) - f0, "B: frames converged");
    end

    // ---- C: 0 dB with erasures
    snr = 7'd0; llr_scale = scale_for(0);
    wait_frames(2);
    f0 = int'(frames); c0 = int'(frames_converged); i0 = int'(iter_sum); fe0 = int'(frame_errors);
    wait_frames(3);
    check(int'(frames_converged) - c0 < int'(frames) - f0, "C: frames reach the iteration limit");
    check(int'(iter_sum) - i0 >= (int'(frames_converged) - c0) + 5 * (int'(frames) - int'(frames_converged)),
          "C: iteration sum");
    check(int'(frame_errors) > fe0, "C: frame errors at 0 dB");

    // ---- mechanisms
    $display("frames=%0d bit_errors=%0d frame_errors=%0d converged=%0d iter_sum=%0d",
             frames, bit_errors, frame_errors, frames_converged, iter_sum);
    $display("early_stop=%0d iteration_limit=%0d erased=%0d feedbacks=%0d bank_swaps=%0d dropped=%0d",
             n_early, n_limit, erased, feedbacks, bank_swaps, frames_dropped);
    check(n_early > 0, "mechanism: early stop");
    check(n_limit > 0, "mechanism: iteration limit");
    check(erased > 0, "mechanism: erasure");
    check(feedbacks > 0, "mechanism: extrinsic feedback");
    check(bank_swaps >= frames, "mechanism: bank swap");
    check(dut.i_primed, "mechanism: rotation delay line filled");
    check(frames_dropped == 0, "no frame dropped");
    check(frames_sent >= frames && frames_sent <= frames + 2, "frames sent versus decoded");
    check(!tx_overflow, "no interleaver overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
