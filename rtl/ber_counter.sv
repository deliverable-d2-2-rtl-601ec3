// ber_counter: bit error rate measurement of the BICM-ID test bench. It
// keeps the information bits sent by the pseudo random generator and
// compares them with the decoded frames coming out of the receiver.
//
// How it works: a reference store of SLOTS frames of K bits, filled
// serially from the generator; frame f goes to slot f mod SLOTS. Decoded
// frames arrive P bits per cycle, in order; each is compared with its slot
// (popcount of the XOR). A dropped frame (skip) advances the read slot
// without counting. Counters: frames, bit errors, frames with errors, bits
// compared.
//
// Interface and timing: ref_valid/ref_bit one reference bit per cycle;
// dec_valid/dec_bits/dec_last one group of P decoded bits per cycle;
// counters are registers updated at the clock edge after each group. The
// reference only names the BER computation; the reference store is this
// design's choice. Its depth must cover the time from a frame's first
// information bit to its last decoded group: in the test bench that is a
// little over two frame times (one to send, one to interleave, plus the
// decoding), so SLOTS defaults to 4.
module ber_counter
  import bicm_pkg::*;
#(
  parameter int unsigned K = K_LDPC,
  parameter int unsigned P = PAR,
  parameter int unsigned SLOTS = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ref_valid,
  input  logic         ref_bit,
  input  logic         dec_valid,
  input  logic [P-1:0] dec_bits,
  input  logic         dec_last,
  input  logic         skip,
  output logic [31:0]  frames,
  output logic [31:0]  bit_errors,
  output logic [31:0]  frame_errors,
  output logic [31:0]  bits_checked
);
  localparam int unsigned SW = $clog2(SLOTS);

  logic [K-1:0]           refm [SLOTS];
  logic [SW-1:0]          wslot, rslot;
  logic [$clog2(K)-1:0]   wcnt;
  logic [$clog2(K/P)-1:0] rgrp;
  logic [P-1:0]           diff;
  logic [$clog2(P+1)-1:0] nerr;
  logic                   frame_bad;

  always_comb begin
    for (int k = 0; k < P; k++) diff[k] = dec_bits[k] ^ refm[rslot][int'(rgrp) * P + k];
    nerr = '0;
    for (int k = 0; k < P; k++) nerr = nerr + ($clog2(P+1))'(diff[k]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wslot <= '0; rslot <= '0; wcnt <= '0; rgrp <= '0;
      frames <= '0; bit_errors <= '0; frame_errors <= '0; bits_checked <= '0;
      frame_bad <= 1'b0;
    end else begin
      if (ref_valid) begin
        refm[wslot][wcnt] <= ref_bit;
        if (int'(wcnt) == int'(K) - 1) begin
          wcnt  <= '0;
          wslot <= (int'(wslot) == int'(SLOTS) - 1) ? '0 : wslot + 1'b1;
        end else begin
          wcnt <= wcnt + 1'b1;
        end
      end
      if (skip) rslot <= (int'(rslot) == int'(SLOTS) - 1) ? '0 : rslot + 1'b1;
      if (dec_valid) begin
        bit_errors   <= bit_errors + 32'(nerr);
        bits_checked <= bits_checked + 32'(P);
        if (dec_last) begin
          rgrp      <= '0;
          rslot     <= (int'(rslot) == int'(SLOTS) - 1) ? '0 : rslot + 1'b1;
          frames    <= frames + 1;
          frame_bad <= 1'b0;
          if (frame_bad || nerr != 0) frame_errors <= frame_errors + 1;
        end else begin
          rgrp <= rgrp + 1'b1;
          if (nerr != 0) frame_bad <= 1'b1;
        end
      end
    end
  end
endmodule
