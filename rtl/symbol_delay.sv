// symbol_delay: the "Delay d" element of the rotated-constellation (signal
// space diversity) chain. At the transmitter it delays the Q component, at
// the receiver the I component and its channel state, so that the two
// components of one cell travel through the channel d cells apart.
//
// How it works: a shift register of D entries of width W that advances only
// on in_valid, so the delay is counted in cells, not clock cycles. out_primed
// goes high once D cells have entered, i.e. once out_data holds a real cell
// rather than the reset contents (zeros).
//
// Interface and timing: while a cell is presented (in_valid high), out_data
// holds the word of the cell presented D cells earlier, straight from a
// register, so a user samples both in the same cycle; out_primed tells
// whether D cells have already gone by. The delay value d is not given in numbers by the reference design;
// D = 1 cell is the default here.
module symbol_delay #(
  parameter int unsigned W = 10,
  parameter int unsigned D = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic [W-1:0] out_data,
  output logic         out_primed
);
  logic [W-1:0] sr [D];
  logic [$clog2(D+1)-1:0] fill;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < D; k++) sr[k] <= '0;
      fill <= '0;
    end else if (in_valid) begin
      sr[0] <= in_data;
      for (int k = 1; k < D; k++) sr[k] <= sr[k-1];
      if (fill != D[$clog2(D+1)-1:0]) fill <= fill + 1'b1;
    end
  end

  assign out_data   = sr[D-1];
  assign out_primed = (fill == D[$clog2(D+1)-1:0]);
endmodule
