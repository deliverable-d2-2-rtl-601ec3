// llr_ecd_ram: the LLR and ECD memories of the BICM-ID receiver, in two
// banks: one bank receives the next frame from the main demapper while the
// other serves the decoder and the feedback demappers of the current frame.
//
// How it works: each bank holds N LLRs (indexed by codeword position, i.e.
// already deinterleaved) and N/2 ECD vectors (four squared distances per
// rotated-QPSK cell, indexed by cell). rx_bank selects the reception bank;
// the decoding side always uses the other one. The reception side writes one
// cell per cycle: its ECD vector and the LLRs of its two bits at their
// codeword positions. The decoding side has P combinational read ports for
// LLRs and ECD vectors and P write ports for updated LLRs.
//
// Interface and timing: reads are combinational (register-file style),
// writes take effect at the clock edge. Writes on the decoding side are to
// distinct addresses within a cycle (each partner bit has one writer). The
// two-bank organisation and the stored contents (ECD instead of I/Q and CSI)
// are the reference design's; the register-file form with P ports is this
// design's, chosen so that a whole layer is served in one cycle.
module llr_ecd_ram
  import bicm_pkg::*;
#(
  parameter int unsigned N = N_LDPC,
  parameter int unsigned P = PAR
) (
  input  logic                          clk,
  input  logic                          rx_bank,
  input  logic                          rx_we,
  input  logic [$clog2(N/M_BITS)-1:0]   rx_cell,
  input  ecd_vec_t                      rx_ecd,
  input  logic [$clog2(N)-1:0]          rx_n   [M_BITS],
  input  logic signed [LLR_W-1:0]       rx_llr [M_BITS],
  input  logic [$clog2(N)-1:0]          rd_n    [P],
  output logic signed [LLR_W-1:0]       rd_llr  [P],
  input  logic [$clog2(N/M_BITS)-1:0]   rd_cell [P],
  output ecd_vec_t                      rd_ecd  [P],
  input  logic                          wr_en   [P],
  input  logic [$clog2(N)-1:0]          wr_n    [P],
  input  logic signed [LLR_W-1:0]       wr_llr  [P]
);
  localparam int unsigned NCELL = N / M_BITS;

  logic signed [LLR_W-1:0] llr_mem [2][N];
  ecd_vec_t                ecd_mem [2][NCELL];
  logic                    db;

  assign db = ~rx_bank;

  always_comb begin
    for (int k = 0; k < P; k++) begin
      rd_llr[k] = llr_mem[db][rd_n[k]];
      rd_ecd[k] = ecd_mem[db][rd_cell[k]];
    end
  end

  always_ff @(posedge clk) begin
    if (rx_we) begin
      ecd_mem[rx_bank][rx_cell] <= rx_ecd;
      for (int b = 0; b < M_BITS; b++) llr_mem[rx_bank][rx_n[b]] <= rx_llr[b];
    end
    for (int k = 0; k < P; k++)
      if (wr_en[k]) llr_mem[db][wr_n[k]] <= wr_llr[k];
  end
endmodule
