// equalizer: per-component zero-forcing equalizer of the receiver. Each
// received component is divided by its channel amplitude, and the amplitude
// is passed on as channel state information (CSI) for the demapper, which
// weighs the distance on each axis by it (rho * (y_eq - x)).
//
// How it works: y_eq = sat(64 * y / rho) on a 9-bit signed scale with
// 1.0 = 64, csi = rho. An erased component (rho = 0) gives y_eq = 0 and
// csi = 0, so it adds nothing to any distance. Divides use the magnitude
// and restore the sign.
//
// Interface and timing: registered, one cycle from in_valid to out_valid.
// The block and its widths (Y_eq 9 bits, CSI 8 bits) are the reference
// setup's; the reference only names it, so the zero-forcing rule and the
// CSI = amplitude choice are this design's, picked to match the demapper's
// distance formula rho*(y_eq - x).
module equalizer
  import bicm_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [Y_W-1:0]   y_i,
  input  logic signed [Y_W-1:0]   y_q,
  input  logic [RHO_W-1:0]        rho_i,
  input  logic [RHO_W-1:0]        rho_q,
  output logic                    out_valid,
  output logic signed [YEQ_W-1:0] yeq_i,
  output logic signed [YEQ_W-1:0] yeq_q,
  output logic [CSI_W-1:0]        csi_i,
  output logic [CSI_W-1:0]        csi_q
);
  function automatic logic signed [YEQ_W-1:0] zf(input logic signed [Y_W-1:0] y,
                                                 input logic [RHO_W-1:0] r);
    int mag, q;
    if (r == '0) return '0;
    mag = (y < 0) ? -int'(y) : int'(y);
    q   = (mag * 64) / int'(r);
    return YEQ_W'(sat((y < 0) ? -q : q, YEQ_W));
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      yeq_i <= '0; yeq_q <= '0; csi_i <= '0; csi_q <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        yeq_i <= zf(y_i, rho_i);
        yeq_q <= zf(y_q, rho_q);
        csi_i <= CSI_W'(rho_i);
        csi_q <= CSI_W'(rho_q);
      end
    end
  end
endmodule
