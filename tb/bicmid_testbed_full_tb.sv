// bicmid_testbed_full_tb: the complete test bench design at its default
// size (64800-bit frames, rate 4/5, 360-column groups, 90 lanes, 15
// iterations, 8 interleaver columns, Q delayed by one cell). It runs at
// Es/N0 = 20 dB with 15 % erased components until two frames have been
// decoded, and checks that both are decoded without bit errors, that the
// decoder stopped early, that erasures and extrinsic feedback happened and
// that no frame was dropped.
module bicmid_testbed_full_tb;
  import bicm_pkg::*;
  logic clk = 0, rst_n = 0, run = 0;
  logic [SNR_W-1:0] snr;
  logic [ERAS_W-1:0] erasure;
  logic [LSC_W-1:0] llr_scale;
  logic [31:0] frames, bit_errors, frame_errors, bits_checked, frames_dropped,
               frames_converged, iter_sum, erased, feedbacks, bank_swaps, frames_sent;
  logic tx_overflow;
  int checks = 0, failures = 0;

  bicmid_testbed dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    snr = 7'd80; erasure = 11'd307; llr_scale = 12'hfff;
    repeat (3) @(posedge clk); #1;
    rst_n = 1; run = 1;
    while (frames < 2) @(posedge clk);
    $display("frames=%0d bit_errors=%0d converged=%0d iter_sum=%0d erased=%0d feedbacks=%0d swaps=%0d",
             frames, bit_errors, frames_converged, iter_sum, erased, feedbacks, bank_swaps);
    check(bit_errors == 0, "no bit errors");
    check(bits_checked == 2 * K_LDPC, "two frames of K bits compared");
    check(frames_converged == 2, "both frames converged");
    check(iter_sum < 2 * ITER_MAX, "early stop");
    check(erased > 0, "erasures");
    check(feedbacks > 0, "extrinsic feedback");
    check(frames_dropped == 0 && !tx_overflow, "no drop, no overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
