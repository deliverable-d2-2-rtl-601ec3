// pi_table: address generator that replaces the interleaver and
// deinterleaver memories of the iterative loop by direct addressing, for one
// decoder lane. Given the codeword index n of a variable node, it returns
// the cell that carries the bit, the bit's position in that cell, and the
// codeword index of the other bit of the same cell (rotated QPSK: two bits
// per cell). The BICM-ID core uses it to route each extrinsic value to the
// demapper that must update the partner bit's LLR.
//
// How it works: for the column-write / row-read block interleaver with NC
// columns and NR = N/NC rows, pi(n) = (n mod NR)*NC + n div NR and
// pi^-1(i) = (i mod NC)*NR + i div NC; the cell is pi(n) div 2, the bit
// position pi(n) mod 2, the partner pi^-1(pi(n) XOR 1).
//
// Interface and timing: combinational. The idea of replacing the memories
// by tables sized for the receiver parallelism is the reference design's;
// computing the addresses arithmetically instead of storing them is this
// design's choice.
module pi_table
  import bicm_pkg::*;
#(
  parameter int unsigned N  = N_LDPC,
  parameter int unsigned NC = NCOL_IL
) (
  input  logic [$clog2(N)-1:0]          n,
  output logic [$clog2(N/M_BITS)-1:0]   cell_idx,
  output logic                          bitpos,
  output logic [$clog2(N)-1:0]          partner
);
  always_comb begin
    int unsigned i;
    i       = pi_fwd(int'(n), N, NC);
    cell_idx = $clog2(N/M_BITS)'(i / M_BITS);
    bitpos  = i[0];
    partner = $clog2(N)'(pi_inv(i ^ 1, N, NC));
  end
endmodule
