// channel_emulator: fading channel with erasures and additive white Gaussian
// noise, applied separately to the I and Q component of every cell (the two
// components of a rotated cell are sent at different times, so they fade
// independently).
//
// How it works, per component and per cell:
//   rho = sqrt((g1^2 + g2^2)/2) / sigma_g   Rayleigh amplitude, E[rho^2] = 1
//   rho = 0 with probability erasure/2048   erasure event
//   y   = rho * x + sigma * n               n ~ N(0,1)
// where g1, g2, n come from gauss_clt sources (a seventh source supplies the
// uniform numbers for the erasure draws) (standard deviation
// sigma_g ~ 147.8). The noise level follows Es/N0 = snr/4 dB:
// sigma = sqrt(1/2) * 10^(-snr/80), built as a product of seven constants,
// one per set bit of snr. Fixed point: x at 1.0 = 256, y and rho at 1.0 = 64.
//
// Interface and timing: in_valid/x_i/x_q is one transmitted cell; the faded,
// noisy cell y_i/y_q with its amplitudes rho_i/rho_q appears one cycle later
// with out_valid. Widths (x 10, y 9, rho 8, snr 7, erasure 11 bits) are the
// reference setup's. Its Gaussian source (Wallace method) and exact erasure
// model are not described there; the central-limit source and the
// independent per-component erasure are this design's choices.
module channel_emulator
  import bicm_pkg::*;
#(
  parameter logic [31:0] SEED = 32'h0BAD_5EED
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [SNR_W-1:0]       snr,
  input  logic [ERAS_W-1:0]      erasure,
  input  logic                   in_valid,
  input  logic signed [X_W-1:0]  x_i,
  input  logic signed [X_W-1:0]  x_q,
  output logic                   out_valid,
  output logic signed [Y_W-1:0]  y_i,
  output logic signed [Y_W-1:0]  y_q,
  output logic [RHO_W-1:0]       rho_i,
  output logic [RHO_W-1:0]       rho_q
);
  // 10^(-2^b/80) in Q16, b = 0..6
  localparam logic [15:0] STEP [SNR_W] = '{16'd63677, 16'd61870, 16'd58409,
                                           16'd52057, 16'd41350, 16'd26090, 16'd10387};
  localparam logic [15:0] SQRT_HALF = 16'd46341;

  logic signed [10:0] g [7];
  logic [31:0]        raw [7];
  logic [31:0]        sigma_q16;

  for (genvar k = 0; k < 7; k++) begin : g_src
    gauss_clt #(.SEED(SEED ^ (32'h9E37_79B9 * (k + 1)))) u_g (
      .clk, .rst_n, .en(in_valid), .sample(g[k]), .raw(raw[k])
    );
  end

  // integer square root, 20-bit argument
  function automatic logic [9:0] isqrt(input logic [19:0] v);
    logic [19:0] rem;
    logic [9:0]  root;
    logic [19:0] trial;
    rem  = v;
    root = '0;
    for (int b = 9; b >= 0; b--) begin
      trial = 20'((({10'd0, root} | (20'd1 << b)) * ({10'd0, root} | (20'd1 << b))));
      if (trial <= rem) root = root | (10'd1 << b);
    end
    return root;
  endfunction

  function automatic logic [RHO_W-1:0] fade(input logic signed [10:0] a,
                                            input logic signed [10:0] b,
                                            input logic [ERAS_W-1:0] u,
                                            input logic [ERAS_W-1:0] er);
    int p;
    if (u < er) return '0;
    p = int'(a) * int'(a) + int'(b) * int'(b);
    // 64*sqrt(p / (2*sigma_g^2)) = sqrt(p * 3/32)
    return RHO_W'(usat(longint'(isqrt(20'((p * 3) >>> 5))), RHO_W));
  endfunction

  function automatic logic signed [Y_W-1:0] rx(input logic signed [X_W-1:0] x,
                                               input logic [RHO_W-1:0] r,
                                               input logic signed [10:0] n,
                                               input logic [31:0] sig);
    longint sig_part, noise;
    sig_part = (longint'(x) * longint'(r)) >>> 8;
    // n*sigma*64/147.8 ~ n*sigma_q16*111 / 2^24
    noise = (longint'(n) * longint'(sig) * 111) >>> 24;
    return Y_W'(sat(int'(sig_part + noise), Y_W));
  endfunction

  always_comb begin
    logic [47:0] acc;
    acc = 48'(SQRT_HALF);
    for (int b = 0; b < SNR_W; b++)
      if (snr[b]) acc = (acc * 48'(STEP[b])) >> 16;
    sigma_q16 = 32'(acc);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y_i <= '0; y_q <= '0; rho_i <= '0; rho_q <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        logic [RHO_W-1:0] ri, rq;
        ri = fade(g[0], g[1], raw[6][ERAS_W-1:0], erasure);
        rq = fade(g[2], g[3], raw[6][16 +: ERAS_W], erasure);
        rho_i <= ri;
        rho_q <= rq;
        y_i   <= rx(x_i, ri, g[4], sigma_q16);
        y_q   <= rx(x_q, rq, g[5], sigma_q16);
      end
    end
  end
endmodule
