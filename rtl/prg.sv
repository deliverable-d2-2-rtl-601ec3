// prg: pseudo random bit generator feeding the transmitter of the BICM-ID
// test bench. One new bit per enabled clock cycle, as the reference setup
// sends one pseudo random bit per clock period.
//
// How it works: a 23-bit Fibonacci LFSR with polynomial x^23 + x^18 + 1 (the
// PRBS-23 sequence); the output bit is the feedback bit. The polynomial, the
// seed and the enable input are this design's own choices; the reference
// design only names the block.
//
// Interface: en advances the sequence; bit_o is valid in the same cycle as
// en (combinational from the state) and the state moves on at the clock edge.
// Synchronous active-low reset loads SEED (must be non-zero).
module prg #(
  parameter logic [22:0] SEED = 23'h5A5A5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic bit_o
);
  logic [22:0] state;

  assign bit_o = state[22] ^ state[17];

  always_ff @(posedge clk) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= {state[21:0], bit_o};
  end
endmodule
