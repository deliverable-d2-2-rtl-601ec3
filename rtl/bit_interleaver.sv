// bit_interleaver: the transmitter's block bit interleaver (pi). Coded bits
// are written column by column into a block of NC columns and N/NC rows and
// read row by row, M_BITS bits at a time, each group forming one cell for
// the mapper.
//
// How it works: two frame banks (ping-pong). Bit n of the incoming codeword
// is stored at read position pi(n) = (n mod NR)*NC + n div NR of the write
// bank. When a bank holds a whole frame it is handed to the read side, which
// sends one cell per cycle; meanwhile the next frame fills the other bank.
// A frame written into a bank that is still being read raises overflow.
//
// Interface and timing: in_valid/in_bit, one coded bit per cycle in natural
// order. out_valid/out_bits: one cell per cycle (bit 0 = even position),
// starting the cycle after the last bit of a frame was written. The
// column-write/row-read principle is the reference design's; NC = 8 and
// the omission of the standard's column twist and bit-to-cell demultiplexer
// permutation are this design's simplifications.
module bit_interleaver
  import bicm_pkg::*;
#(
  parameter int unsigned N  = N_LDPC,
  parameter int unsigned NC = NCOL_IL
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              in_bit,
  output logic              out_valid,
  output logic [M_BITS-1:0] out_bits,
  output logic              out_last,
  output logic              overflow
);
  localparam int unsigned NCELL = N / M_BITS;

  logic [N-1:0]               mem [2];
  logic [1:0]                 full;
  logic                       wb, rb;
  logic [$clog2(N)-1:0]       wcnt;
  logic [$clog2(NCELL)-1:0]   rcnt;
  logic [$clog2(N)-1:0]       waddr;

  assign waddr = $clog2(N)'(pi_fwd(int'(wcnt), N, NC));

  always_comb begin
    for (int b = 0; b < M_BITS; b++)
      out_bits[b] = mem[rb][int'(rcnt) * M_BITS + b];
  end
  assign out_valid = full[rb];
  assign out_last  = full[rb] && (int'(rcnt) == int'(NCELL) - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full     <= '0;
      wb       <= 1'b0;
      rb       <= 1'b0;
      wcnt     <= '0;
      rcnt     <= '0;
      overflow <= 1'b0;
    end else begin
      if (in_valid) begin
        mem[wb][waddr] <= in_bit;
        if (full[wb]) overflow <= 1'b1;
        if (int'(wcnt) == int'(N) - 1) begin
          wcnt     <= '0;
          full[wb] <= 1'b1;
          wb       <= ~wb;
        end else begin
          wcnt <= wcnt + 1'b1;
        end
      end
      if (full[rb]) begin
        if (int'(rcnt) == int'(NCELL) - 1) begin
          rcnt     <= '0;
          full[rb] <= 1'b0;
          rb       <= ~rb;
        end else begin
          rcnt <= rcnt + 1'b1;
        end
      end
    end
  end
endmodule
