// prg_tb: checks the pseudo random generator against an integer model of
// the PRBS-23 recurrence b[k] = b[k-23] XOR b[k-18], including hold while
// the enable is low, and that the output is balanced.
module prg_tb;
  logic clk = 0, rst_n = 0, en = 0, bit_o;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  prg #(.SEED(23'h5A5A5)) dut (.*);

  initial begin
    bit hist [$];
    int ones = 0;
    // history seeded with the reset state, oldest bit first
    for (int k = 22; k >= 0; k--) hist.push_back(bit'((23'h5A5A5 >> k) & 1));
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      bit exp_b;
      en = ($urandom_range(0, 3) != 0);
      exp_b = hist[hist.size() - 23] ^ hist[hist.size() - 18];
      #1;
      checks++;
      if (bit_o !== exp_b) begin
        failures++;
        if (failures < 5) $display("FAIL at %0d: got %b exp %b", k, bit_o, exp_b);
      end
      if (en) begin
        hist.push_back(exp_b);
        ones += int'(exp_b);
      end
      @(negedge clk);
    end
    checks++;
    if (ones < 1200 || ones > 1800) begin
      failures++;
      $display("FAIL: unbalanced, %0d ones", ones);
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
