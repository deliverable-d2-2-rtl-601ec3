// rotated_mapper_tb: sends random cells and checks each output against
// Gray QPSK rotated by 29 degrees, computed here with real arithmetic
// (scale 256, rounded), with Q taken from the cell sent D cells earlier
// and zero before that; also checks the one-cycle valid latency.
module rotated_mapper_tb;
  localparam int D = 2;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [1:0] in_bits = '0;
  logic signed [9:0] x_i, x_q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  rotated_mapper #(.D(D)) dut (.*);

  function automatic int ref_coord(input logic [1:0] b, input bit q_axis);
    real a, i0, q0, ang, v;
    a   = 1.0 / $sqrt(2.0);
    ang = 29.0 * 3.14159265358979 / 180.0;
    i0  = b[0] ? -a : a;
    q0  = b[1] ? -a : a;
    v   = q_axis ? (i0 * $sin(ang) + q0 * $cos(ang)) : (i0 * $cos(ang) - q0 * $sin(ang));
    return int'($rtoi(v * 256.0 + (v >= 0 ? 0.5 : -0.5)));
  endfunction

  initial begin
    logic [1:0] sent [$];
    bit was_valid;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      in_valid = ($urandom_range(0, 3) != 0);
      in_bits  = 2'($urandom);
      was_valid = in_valid;
      if (in_valid) sent.push_back(in_bits);
      @(negedge clk);
      checks++;
      if (out_valid !== was_valid) begin
        failures++;
        $display("FAIL valid at %0d", k);
      end
      if (was_valid) begin
        int ei, eq;
        ei = ref_coord(sent[sent.size() - 1], 1'b0);
        eq = (sent.size() > D) ? ref_coord(sent[sent.size() - 1 - D], 1'b1) : 0;
        checks += 2;
        if (int'(x_i) != ei) begin failures++; $display("FAIL I %0d exp %0d", x_i, ei); end
        if (int'(x_q) != eq) begin failures++; $display("FAIL Q %0d exp %0d", x_q, eq); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
