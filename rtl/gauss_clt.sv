// gauss_clt: approximately Gaussian noise source for the channel emulator.
//
// How it works: a 32-bit xorshift generator (shifts 13, 17, 5) advances once
// per enabled cycle; its four bytes, read as signed numbers, are summed. By
// the central limit theorem the sum is close to Gaussian with zero mean and
// a standard deviation of about 147.8 (variance 4 * 65536/12). The reference
// emulator uses the Wallace method, which it does not describe; this simpler
// generator is this design's substitute and has lighter tails.
//
// Interface and timing: sample is a function of the current state; en moves
// to the next sample at the clock edge. Reset loads SEED (non-zero).
module gauss_clt #(
  parameter logic [31:0] SEED = 32'h1234_5678
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  output logic signed [10:0] sample,
  output logic [31:0]        raw
);
  logic [31:0] s, t1, t2, t3;

  always_comb begin
    t1 = s ^ (s << 13);
    t2 = t1 ^ (t1 >> 17);
    t3 = t2 ^ (t2 << 5);
    sample = 11'(signed'(s[7:0])) + 11'(signed'(s[15:8]))
           + 11'(signed'(s[23:16])) + 11'(signed'(s[31:24]));
  end
  assign raw = s;

  always_ff @(posedge clk) begin
    if (!rst_n)  s <= SEED;
    else if (en) s <= t3;
  end
endmodule
