// llr_ecd_ram_tb: small memory (N = 48, P = 4). Fills the reception bank
// with random LLRs and ECD vectors, swaps banks, and checks that the
// decoding side reads them back through all P ports while a new frame is
// written into the other bank, and that decoder write-backs land in the
// decoding bank only. A shadow model of both banks is kept here.
module llr_ecd_ram_tb;
  import bicm_pkg::*;
  localparam int unsigned N = 48, P = 4, NCELL = N / M_BITS;
  logic clk = 0;
  logic rx_bank, rx_we;
  logic [$clog2(NCELL)-1:0] rx_cell;
  ecd_vec_t rx_ecd;
  logic [$clog2(N)-1:0] rx_n [M_BITS];
  logic signed [LLR_W-1:0] rx_llr [M_BITS];
  logic [$clog2(N)-1:0] rd_n [P];
  logic signed [LLR_W-1:0] rd_llr [P];
  logic [$clog2(NCELL)-1:0] rd_cell [P];
  ecd_vec_t rd_ecd [P];
  logic wr_en [P];
  logic [$clog2(N)-1:0] wr_n [P];
  logic signed [LLR_W-1:0] wr_llr [P];
  int checks = 0, failures = 0;
  logic [7:0] m_llr [2][N];
  ecd_vec_t m_ecd [2][NCELL];

  llr_ecd_ram #(.N(N), .P(P)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 8) $display("FAIL: %s", s); end
  endtask

  // one cycle: write cell c of the reception bank, read/write on the other
  task automatic step(input int c, input bit do_wr);
    rx_we = 1;
    rx_cell = ($clog2(NCELL))'(c);
    for (int p = 0; p < N_PTS; p++) rx_ecd[p] = ECD_W'($urandom);
    for (int b = 0; b < M_BITS; b++) begin
      rx_n[b] = ($clog2(N))'(b * NCELL + c);
      rx_llr[b] = LLR_W'($urandom);
    end
    for (int k = 0; k < P; k++) begin
      rd_n[k] = ($clog2(N))'(k * (N / P) + (c % (N / P)));
      rd_cell[k] = ($clog2(NCELL))'(k * (NCELL / P) + (c % (NCELL / P)));
      wr_en[k] = do_wr && ($urandom_range(0, 1) == 1);
      wr_n[k] = rd_n[k];
      wr_llr[k] = LLR_W'($urandom);
    end
    #1;
    for (int k = 0; k < P; k++) begin
      check(rd_llr[k] == m_llr[~rx_bank][rd_n[k]], "LLR read");
      check(rd_ecd[k] == m_ecd[~rx_bank][rd_cell[k]], "ECD read");
    end
    @(posedge clk);
    m_ecd[rx_bank][c] = rx_ecd;
    for (int b = 0; b < M_BITS; b++) m_llr[rx_bank][rx_n[b]] = rx_llr[b];
    for (int k = 0; k < P; k++) if (wr_en[k]) m_llr[~rx_bank][wr_n[k]] = wr_llr[k];
    #1;
  endtask

  initial begin
    rx_bank = 0; rx_we = 0;
    for (int k = 0; k < P; k++) wr_en[k] = 0;
    @(posedge clk); #1;
    // first frame: only the reception side is defined
    for (int c = 0; c < NCELL; c++) begin
      rx_we = 1;
      rx_cell = ($clog2(NCELL))'(c);
      for (int p = 0; p < N_PTS; p++) rx_ecd[p] = ECD_W'($urandom);
      for (int b = 0; b < M_BITS; b++) begin
        rx_n[b] = ($clog2(N))'(b * NCELL + c);
        rx_llr[b] = LLR_W'($urandom);
      end
      @(posedge clk);
      m_ecd[0][c] = rx_ecd;
      for (int b = 0; b < M_BITS; b++) m_llr[0][rx_n[b]] = rx_llr[b];
      #1;
    end
    // swap several times: decode one bank while receiving into the other
    for (int f = 0; f < 6; f++) begin
      rx_bank = ~rx_bank;
      for (int c = 0; c < NCELL; c++) step(c, f > 0);
      // after the frame: full read-back of the decoding bank
      rx_we = 0;
      for (int k = 0; k < P; k++) wr_en[k] = 0;
      for (int i = 0; i < N; i++) begin
        rd_n[0] = ($clog2(N))'(i);
        rd_cell[0] = ($clog2(NCELL))'(i % NCELL);
        #1;
        check(rd_llr[0] == m_llr[~rx_bank][i], "LLR read-back");
        check(rd_ecd[0] == m_ecd[~rx_bank][i % NCELL], "ECD read-back");
      end
    end
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
