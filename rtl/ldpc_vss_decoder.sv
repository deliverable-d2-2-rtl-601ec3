// ldpc_vss_decoder: layered LDPC decoder with a vertical shuffled schedule
// (VSS) and the three-minimum normalized min-sum check update (MS3), for
// the periodic IRA codes of bicm_pkg. P lanes (vss_node_unit) each process
// one variable node per cycle: one "layer" of P columns per cycle, so one
// iteration over N columns takes N/P cycles.
//
// How it works. Layer l < K/P holds the information columns l*P .. l*P+P-1
// (P divides the 360-column group, so the P columns of a layer reach P
// different checks on each of their three edges). Layer l >= K/P holds the
// parity columns K + r + k*(N-K)/P, r = l - K/P, k = 0..P-1: taking them with
// a stride keeps the two neighbours of the staircase (which share a check)
// out of the same layer, so no check is updated twice in one cycle. The
// decoder keeps per check node the MS3 state (three minima, their indices,
// the sign product and the syndrome bit), per edge the sign of T_mn and per
// column the hard decision. A counter of unsatisfied checks is updated
// incrementally; after the last layer of an iteration the decoder stops if
// it is zero (a codeword) or if ITER iterations are done.
//
// Interface and timing: start (while idle) clears the state and starts at
// iteration 1. While busy, lane_n[k] is the column of lane k this cycle, and
// the LLR of that column must be presented on lane_llr[k] in the same cycle
// (combinational read); lane_ext[k] is its new extrinsic value. done pulses
// for one cycle after the last layer; iters and converged then describe the
// frame. rd_grp/rd_bits read P hard decisions (columns rd_grp*P ..) at any
// time. Decoding latency: iters * N/P + 1 cycles from start to done.
// start clears every check state, sign and hard decision in one cycle (a
// flash clear of the register arrays); written as loops over all N-K checks
// and N columns, it needs a loop-unroll limit above N in synthesis tools
// that unroll procedural loops.
// The algorithm, P = 90 and the iteration limit are the reference design's;
// the one-layer-per-cycle organisation (all edges of a column at once) and
// the syndrome-based stop are this design's choices.
module ldpc_vss_decoder
  import bicm_pkg::*;
#(
  parameter int unsigned N    = N_LDPC,
  parameter int unsigned K    = K_LDPC,
  parameter int unsigned GRP  = GROUP,
  parameter int unsigned P    = PAR,
  parameter int unsigned ITER = ITER_MAX
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  output logic [4:0]              iters,
  output logic                    converged,
  output logic                    first_iter,
  output logic [IDX_W-1:0]        lane_n   [P],
  input  logic signed [LLR_W-1:0] lane_llr [P],
  output logic signed [EXT_W-1:0] lane_ext [P],
  input  logic [$clog2(N/P)-1:0]  rd_grp,
  output logic [P-1:0]            rd_bits
);
  localparam int unsigned M      = N - K;
  localparam int unsigned L      = N / P;      // layers per iteration
  localparam int unsigned LI     = K / P;      // information layers
  localparam int unsigned STRIDE = M / P;      // parity stride
  localparam int unsigned CW     = $clog2(M);

  cn_t               cn_mem [M];
  logic [DV_MAX-1:0] sgn_mem [N];
  logic              hd_mem  [N];
  logic [$clog2(L)-1:0] layer;
  logic [$clog2(M+1)-1:0] unsat;

  logic [CW-1:0]     chk     [P][DV_MAX];
  logic [DV_MAX-1:0] edge_en [P];
  cn_t               cn_rd   [P][DV_MAX];
  cn_t               cn_wr   [P][DV_MAX];
  logic [DV_MAX-1:0] sgn_wr  [P];
  logic [$clog2(N)-1:0] col  [P];
  logic              hd_wr   [P];
  int                unsat_next;
  logic signed [LLR_W+2:0] t_n_unused [P];  // a-posteriori value, observation only

  // column and check addresses of each lane
  always_comb begin
    for (int k = 0; k < P; k++) begin
      int unsigned nn, i;
      nn = 0;
      i  = 0;
      if (int'(layer) < int'(LI)) begin
        nn = int'(layer) * P + k;
        for (int e = 0; e < DV_MAX; e++) chk[k][e] = CW'(info_check(nn, e, N, K, GRP));
        edge_en[k] = '1;
      end else begin
        i  = (int'(layer) - LI) + k * STRIDE;
        nn = K + i;
        chk[k][0] = CW'(i);
        chk[k][1] = (i + 1 < M) ? CW'(i + 1) : CW'(0);
        chk[k][2] = '0;
        edge_en[k] = (i + 1 < M) ? 3'b011 : 3'b001;
      end
      lane_n[k] = IDX_W'(nn);
      col[k]    = $clog2(N)'(nn);
      for (int e = 0; e < DV_MAX; e++) cn_rd[k][e] = cn_mem[chk[k][e]];
    end
  end

  for (genvar k = 0; k < P; k++) begin : g_lane
    vss_node_unit u_node (
      .n(lane_n[k]), .first_iter, .llr(lane_llr[k]), .edge_en(edge_en[k]),
      .cn_in(cn_rd[k]), .sgn_in(sgn_mem[col[k]]), .hd_in(hd_mem[col[k]]),
      .cn_out(cn_wr[k]), .sgn_out(sgn_wr[k]), .hd_out(hd_wr[k]),
      .ext(lane_ext[k]), .t_n(t_n_unused[k])
    );
  end

  always_comb begin
    unsat_next = int'(unsat);
    for (int k = 0; k < P; k++)
      for (int e = 0; e < DV_MAX; e++)
        if (edge_en[k][e])
          unsat_next += int'(cn_wr[k][e].par) - int'(cn_rd[k][e].par);
  end

  always_comb begin
    for (int k = 0; k < P; k++) rd_bits[k] = hd_mem[int'(rd_grp) * P + k];
  end

  assign first_iter = (iters == 5'd1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      iters     <= '0;
      converged <= 1'b0;
      layer     <= '0;
      unsat     <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          for (int c = 0; c < M; c++) cn_mem[c] <= CN_INIT;
          for (int c = 0; c < N; c++) begin
            sgn_mem[c] <= '0;
            hd_mem[c]  <= 1'b0;
          end
          unsat     <= '0;
          layer     <= '0;
          iters     <= 5'd1;
          converged <= 1'b0;
          busy      <= 1'b1;
        end
      end else begin
        for (int k = 0; k < P; k++) begin
          for (int e = 0; e < DV_MAX; e++)
            if (edge_en[k][e]) cn_mem[chk[k][e]] <= cn_wr[k][e];
          sgn_mem[col[k]] <= sgn_wr[k];
          hd_mem[col[k]]  <= hd_wr[k];
        end
        unsat <= ($clog2(M+1))'(unsat_next);
        if (int'(layer) == int'(L) - 1) begin
          layer <= '0;
          if (unsat_next == 0 || int'(iters) == int'(ITER)) begin
            busy      <= 1'b0;
            done      <= 1'b1;
            converged <= (unsat_next == 0);
          end else begin
            iters <= iters + 1'b1;
          end
        end else begin
          layer <= layer + 1'b1;
        end
      end
    end
  end
endmodule
