// ldpc_encoder: systematic encoder for the irregular repeat-accumulate (IRA)
// LDPC code of the BICM-ID test bench (64800-bit frames, rate 4/5 by default).
//
// How it works: information bits pass straight to the output (systematic
// part) while each one is added (XOR) into the three parity accumulators its
// column touches in the parity-check matrix (bicm_pkg::info_check). Once the
// K information bits are in, the staircase part is resolved on the fly:
// parity bit i = parity bit i-1 XOR accumulator i, output one per cycle; each
// accumulator is cleared as it is read, ready for the next frame.
//
// Interface and timing: in_ready is high while information bits are
// accepted; in_valid & in_ready takes one bit. The codeword comes out in
// natural order c_0 .. c_{N-1}, one bit per cycle with out_valid: the
// systematic bits in the cycle they enter, then N-K parity cycles during
// which in_ready is low. A frame therefore takes N cycles at full input rate.
// The code structure (IRA with 360-column periodicity, staircase parity) is
// the reference design's; the address formula replacing the standard's
// tables is this design's own.
module ldpc_encoder
  import bicm_pkg::*;
#(
  parameter int unsigned N    = N_LDPC,
  parameter int unsigned K    = K_LDPC,
  parameter int unsigned GRP  = GROUP
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_bit,
  output logic in_ready,
  output logic out_valid,
  output logic out_bit,
  output logic out_last
);
  localparam int unsigned M = N - K;

  logic [M-1:0]           acc;
  logic [$clog2(N)-1:0]   cnt;      // codeword index of the next output bit
  logic                   in_info;  // systematic phase
  logic                   prev_p;   // last parity bit
  logic [$clog2(M)-1:0]   chk [DV_MAX];
  logic [$clog2(M)-1:0]   pidx;
  logic                   p_now;

  always_comb begin
    for (int e = 0; e < DV_MAX; e++)
      chk[e] = $clog2(M)'(info_check(int'(cnt), e, N, K, GRP));
    pidx  = $clog2(M)'(int'(cnt) - int'(K));
    p_now = prev_p ^ acc[pidx];
  end

  assign in_info   = (int'(cnt) < int'(K));
  assign in_ready  = in_info;
  assign out_valid = in_info ? in_valid : 1'b1;
  assign out_bit   = in_info ? in_bit : p_now;
  assign out_last  = !in_info && (int'(cnt) == int'(N) - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int c = 0; c < M; c++) acc[c] <= 1'b0;
      cnt    <= '0;
      prev_p <= 1'b0;
    end else if (in_info) begin
      if (in_valid) begin
        if (in_bit)
          for (int e = 0; e < DV_MAX; e++) acc[chk[e]] <= ~acc[chk[e]];
        cnt <= cnt + 1'b1;
      end
    end else begin
      acc[pidx] <= 1'b0;
      prev_p    <= p_now;
      if (int'(cnt) == int'(N) - 1) begin
        cnt    <= '0;
        prev_p <= 1'b0;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
