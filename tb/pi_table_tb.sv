// pi_table_tb: for every codeword position of a 240-bit frame (NC = 8), the
// test fills a block column by column, reads it row by row to find where
// each bit lands, and checks the cell, the bit position and the partner
// (the other bit of the same cell) reported by pi_table.
module pi_table_tb;
  localparam int N = 240, NC = 8, NR = N / NC;
  logic [7:0] n;
  logic [6:0] cell_idx;
  logic bitpos;
  logic [7:0] partner;
  int checks = 0, failures = 0;
  pi_table #(.N(N), .NC(NC)) dut (.*);

  initial begin
    int pos [N];   // read position of codeword bit
    int src [N];   // codeword bit at read position
    int blk [NR][NC];
    for (int k = 0; k < N; k++) blk[k % NR][k / NR] = k;
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NC; c++) begin
        pos[blk[r][c]] = r * NC + c;
        src[r * NC + c] = blk[r][c];
      end
    for (int k = 0; k < N; k++) begin
      n = 8'(k);
      #1;
      checks += 3;
      if (int'(cell_idx) != pos[k] / 2) begin failures++; $display("FAIL cell %0d", k); end
      if (int'(bitpos) != pos[k] % 2) begin failures++; $display("FAIL bit %0d", k); end
      if (int'(partner) != src[pos[k] ^ 1]) begin failures++; $display("FAIL partner %0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
