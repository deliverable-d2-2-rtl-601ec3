// rotated_mapper: Gray-mapped QPSK constellation rotated by 29 degrees, the
// signal space diversity mapper of DVB-T2. Each cell carries two interleaved
// bits; its I component is sent now and its Q component d cells later
// (through a symbol_delay), so a deep fade rarely hits both.
//
// How it works: a small table of the four rotated points (coordinates from
// bicm_pkg, 1.0 = 256 on a 10-bit signed scale) selected by the two bits,
// followed by the Q delay line. Bit 0 of the cell selects the sign of the
// unrotated I axis, bit 1 that of Q.
//
// Interface and timing: in_valid/in_bits is one cell; x_i, x_q and out_valid
// are registered and appear one cycle later. x_q belongs to the cell sent D
// cells earlier. The rotation angle and QPSK order are this design's choice
// for the configuration whose hardware measurements the reference reports
// (QPSK); the reference gives the I/Q widths (10 bits) and the Q delay.
module rotated_mapper
  import bicm_pkg::*;
#(
  parameter int unsigned D = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [M_BITS-1:0]   in_bits,
  output logic                out_valid,
  output logic signed [X_W-1:0] x_i,
  output logic signed [X_W-1:0] x_q
);
  logic signed [X_W-1:0] pi_c, pq_c, q_old;
  logic primed;

  always_comb begin
    pi_c = X_W'(pt_i(int'(in_bits), X_SMALL, X_LARGE));
    pq_c = X_W'(pt_q(int'(in_bits), X_SMALL, X_LARGE));
  end

  symbol_delay #(.W(X_W), .D(D)) u_qdelay (
    .clk, .rst_n, .in_valid,
    .in_data(pq_c), .out_data(q_old), .out_primed(primed)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      x_i       <= '0;
      x_q       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        x_i <= pi_c;
        x_q <= primed ? q_old : '0;  // zero until D cells have been sent
      end
    end
  end
endmodule
