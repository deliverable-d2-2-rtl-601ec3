// vss_node_unit: one lane of the vertical-shuffled LDPC decoder: a variable
// node processor together with the check-node processing and check-node
// update of all (up to three) check nodes of that variable node, using the
// normalized min-sum algorithm with three stored minima (MS3).
//
// How it works, for variable node n with channel LLR L_n in iteration t:
//   check node processing  E_mn = 0 in the first iteration, else
//                          (alpha_m XOR s_mn) * eta * (n == P0_m ? M1_m : M0_m)
//                          where s_mn is the sign of T_mn from the previous
//                          iteration and eta = 3/4;
//   variable node          T_n = L_n + sum_m E_mn,  T_mn = T_n - E_mn;
//   variable node update   ext_n = T_n - L_n (to the feedback demapper);
//   check node update      alpha_m ^= s_mn ^ sign(T_mn); the entries of n
//                          leave the (M0,M1,M2 / P0,P1,P2) list, |T_mn| joins
//                          it and the three smallest stay, in order;
//                          par_m flips when the hard decision of n flips.
// Magnitudes saturate at 2^MAG_W - 1; ext saturates to EXT_W bits.
//
// Interface and timing: purely combinational. The decoder reads the states
// of the checks of n (cn_in), the stored signs (sgn_in) and the old hard
// decision, and writes back cn_out, sgn_out and hd_out at the clock edge.
// Edges with edge_en low pass their check state through unchanged.
// Algorithm and MS3 list are the reference design's; eta = 3/4 and the
// saturation widths are this design's choices.
module vss_node_unit
  import bicm_pkg::*;
(
  input  logic [IDX_W-1:0]        n,
  input  logic                    first_iter,
  input  logic signed [LLR_W-1:0] llr,
  input  logic [DV_MAX-1:0]       edge_en,
  input  cn_t                     cn_in  [DV_MAX],
  input  logic [DV_MAX-1:0]       sgn_in,
  input  logic                    hd_in,
  output cn_t                     cn_out [DV_MAX],
  output logic [DV_MAX-1:0]       sgn_out,
  output logic                    hd_out,
  output logic signed [EXT_W-1:0] ext,
  output logic signed [LLR_W+2:0] t_n
);
  localparam int MAXMAG = (1 << MAG_W) - 1;

  logic signed [31:0] e_msg [DV_MAX];
  logic signed [31:0] t_sum;
  logic signed [31:0] mag  [DV_MAX];
  logic signed [31:0] tmn  [DV_MAX];
  logic signed [31:0] amag [DV_MAX];
  logic ns [DV_MAX];
  logic [MAG_W-1:0] cm [DV_MAX][4];
  logic [IDX_W-1:0] cp [DV_MAX][4];
  logic [MAG_W-1:0] tm;
  logic [IDX_W-1:0] tp;

  // check node processing
  always_comb begin
    for (int e = 0; e < DV_MAX; e++) begin
      mag[e] = (cn_in[e].p0 == n) ? int'(cn_in[e].m1) : int'(cn_in[e].m0);
      mag[e] = (mag[e] * 3) >>> 2;
      if (first_iter || !edge_en[e]) e_msg[e] = 0;
      else e_msg[e] = (cn_in[e].alpha ^ sgn_in[e]) ? -mag[e] : mag[e];
    end
    t_sum = int'(llr);
    for (int e = 0; e < DV_MAX; e++) t_sum += e_msg[e];
  end

  assign t_n    = (LLR_W+3)'(t_sum);
  assign hd_out = (t_sum < 0);
  assign ext    = EXT_W'(sat(t_sum - int'(llr), EXT_W));

  // check node update
  always_comb begin
    cn_out  = cn_in;
    sgn_out = sgn_in;
    tm      = '0;
    tp      = '0;
    for (int e = 0; e < DV_MAX; e++) begin
      tmn[e]  = t_sum - e_msg[e];
      ns[e]   = (tmn[e] < 0);
      amag[e] = ns[e] ? -tmn[e] : tmn[e];
      if (amag[e] > MAXMAG) amag[e] = MAXMAG;

      // candidates: stored minima other than n, then the new value
      cm[e][0] = cn_in[e].m0; cp[e][0] = cn_in[e].p0;
      cm[e][1] = cn_in[e].m1; cp[e][1] = cn_in[e].p1;
      cm[e][2] = cn_in[e].m2; cp[e][2] = cn_in[e].p2;
      for (int k = 0; k < 3; k++)
        if (cp[e][k] == n) begin
          cm[e][k] = MAG_W'(MAXMAG);
          cp[e][k] = IDX_NONE;
        end
      cm[e][3] = MAG_W'(amag[e]); cp[e][3] = n;
      // sort ascending (stable), keep the first three
      for (int i = 0; i < 3; i++)
        for (int k = 3; k > i; k--)
          if (cm[e][k] < cm[e][k-1]) begin
            tm = cm[e][k]; cm[e][k] = cm[e][k-1]; cm[e][k-1] = tm;
            tp = cp[e][k]; cp[e][k] = cp[e][k-1]; cp[e][k-1] = tp;
          end

      if (edge_en[e]) begin
        cn_out[e].m0    = cm[e][0]; cn_out[e].p0 = cp[e][0];
        cn_out[e].m1    = cm[e][1]; cn_out[e].p1 = cp[e][1];
        cn_out[e].m2    = cm[e][2]; cn_out[e].p2 = cp[e][2];
        cn_out[e].alpha = cn_in[e].alpha ^ sgn_in[e] ^ ns[e];
        cn_out[e].par   = cn_in[e].par ^ (hd_in ^ (t_sum < 0));
        sgn_out[e]      = ns[e];
      end
    end
  end
endmodule
