// bit_interleaver_tb: three frames of N = 96 bits (NC = 8 columns) enter
// back to back; the test builds the column-write / row-read block itself
// (a 2-D array) and checks every output cell, the cell count per frame,
// out_last and that no overflow is flagged.
module bit_interleaver_tb;
  import bicm_pkg::*;
  localparam int N = 96, NC = 8, NR = N / NC;
  logic clk = 0, rst_n = 0, in_valid = 0, in_bit = 0;
  logic out_valid, out_last, overflow;
  logic [1:0] out_bits;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  bit_interleaver #(.N(N), .NC(NC)) dut (.*);

  logic frames [3][N];
  logic expect_q [$];
  int ncells = 0, nlast = 0;

  always @(posedge clk) if (rst_n && out_valid) begin
    logic e0, e1;
    e0 = expect_q.pop_front();
    e1 = expect_q.pop_front();
    checks++;
    if (out_bits !== {e1, e0}) begin
      failures++;
      $display("FAIL cell %0d: %b exp %b%b", ncells, out_bits, e1, e0);
    end
    ncells++;
    if (out_last) begin
      nlast++;
      checks++;
      if (ncells != nlast * N / 2) begin failures++; $display("FAIL last position"); end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      logic blk [NR][NC];
      for (int n = 0; n < N; n++) frames[f][n] = 1'($urandom);
      // column by column
      for (int n = 0; n < N; n++) blk[n % NR][n / NR] = frames[f][n];
      // row by row
      for (int r = 0; r < NR; r++) for (int c = 0; c < NC; c++) expect_q.push_back(blk[r][c]);
      for (int n = 0; n < N; n++) begin
        in_valid = 1;
        in_bit = frames[f][n];
        @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (N) @(negedge clk);
    checks += 2;
    if (ncells != 3 * N / 2) begin failures++; $display("FAIL cells %0d", ncells); end
    if (overflow) begin failures++; $display("FAIL overflow"); end
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
