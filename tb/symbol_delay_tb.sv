// symbol_delay_tb: random words with random gaps in in_valid; checks that
// out_data, sampled with each valid word, is the word D valid cycles
// earlier, and that out_primed rises after D words.
module symbol_delay_tb;
  localparam int W = 12, D = 3;
  logic clk = 0, rst_n = 0, in_valid = 0, out_primed;
  logic [W-1:0] in_data = '0, out_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  symbol_delay #(.W(W), .D(D)) dut (.*);

  initial begin
    logic [W-1:0] q [$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 500; k++) begin
      in_valid = ($urandom_range(0, 2) != 0);
      in_data  = W'($urandom);
      #1;
      if (in_valid) begin
        checks++;
        if (out_primed !== (q.size() >= D)) begin
          failures++;
          $display("FAIL primed at %0d", k);
        end
        if (q.size() >= D) begin
          checks++;
          if (out_data !== q[q.size() - D]) begin
            failures++;
            $display("FAIL data at %0d", k);
          end
        end
        q.push_back(in_data);
      end
      @(negedge clk);
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
