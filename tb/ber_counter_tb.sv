// ber_counter_tb: K = 48, P = 4. Streams reference frames bit by bit, then
// presents decoded frames, up to three frames behind, group by group with chosen errors (none, a few,
// one frame skipped), and checks the bit error, frame error, frame and
// checked-bit counters against counts kept here.
module ber_counter_tb;
  localparam int unsigned K = 48, P = 4;
  logic clk = 0, rst_n = 0;
  logic ref_valid, ref_bit, dec_valid, dec_last, skip;
  logic [P-1:0] dec_bits;
  logic [31:0] frames, bit_errors, frame_errors, bits_checked;
  int checks = 0, failures = 0;
  logic [K-1:0] refs [$];
  int e_bits = 0, e_frames = 0, e_ferr = 0, e_checked = 0;

  ber_counter #(.K(K), .P(P)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 8) $display("FAIL: %s", s); end
  endtask

  task automatic send_ref();
    logic [K-1:0] fr;
    for (int i = 0; i < K; i++) begin
      fr[i] = 1'($urandom);
      ref_valid = 1; ref_bit = fr[i];
      @(posedge clk); #1;
    end
    ref_valid = 0;
    refs.push_back(fr);
  endtask

  task automatic send_dec(input int nerr);
    logic [K-1:0] fr;
    bit flip [K];
    int ne = 0;
    fr = refs.pop_front();
    for (int i = 0; i < K; i++) flip[i] = 0;
    for (int k = 0; k < nerr; k++) flip[$urandom_range(0, K - 1)] = 1;
    for (int i = 0; i < K; i++) ne += flip[i];
    for (int g = 0; g < K / P; g++) begin
      dec_valid = 1;
      dec_last = (g == K / P - 1);
      for (int k = 0; k < P; k++) dec_bits[k] = fr[g * P + k] ^ flip[g * P + k];
      @(posedge clk); #1;
    end
    dec_valid = 0; dec_last = 0;
    e_bits += ne; e_frames++; e_checked += K;
    if (ne > 0) e_ferr++;
  endtask

  initial begin
    ref_valid = 0; ref_bit = 0; dec_valid = 0; dec_last = 0; skip = 0; dec_bits = '0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    send_ref(); send_ref(); send_ref();   // decoding runs up to three frames behind
    send_dec(0);
    send_ref();
    send_dec(3);
    // the next frame is dropped by the receiver
    skip = 1; @(posedge clk); #1; skip = 0;
    void'(refs.pop_front());
    send_ref();
    send_dec(1);
    for (int f = 0; f < 10; f++) begin
      send_ref();
      send_dec(f % 3);
    end
    check(frames == 32'(e_frames), "frame count");
    check(bit_errors == 32'(e_bits), "bit errors");
    check(frame_errors == 32'(e_ferr), "frame errors");
    check(bits_checked == 32'(e_checked), "checked bits");
    $display("frames=%0d bit_errors=%0d frame_errors=%0d", frames, bit_errors, frame_errors);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
