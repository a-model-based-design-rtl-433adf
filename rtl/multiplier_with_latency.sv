// Multiplier with latency: an IEEE-754 single-precision multiplier followed
// by a delay of Q clock cycles; a * b issued in cycle t appears at prod in
// cycle t+Q, one product per cycle. As for the adder, this is the published
// model of a pipelined floating-point unit (a multiplier cascaded with a
// z^-Q delay). Q = 6 is the latency reported for its multiplier.
// Rounding is to nearest even, subnormals are flushed to zero (see db_pkg).
module multiplier_with_latency
  import db_pkg::*;
#(
  parameter int unsigned Q = 6
) (
  input  logic  clk,
  input  logic  rst,
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t prod
);
  delay_line #(.W(FP_W), .D(Q)) u_delay (
    .clk (clk),
    .rst (rst),
    .din (fp32_mul(a, b)),
    .dout(prod)
  );
endmodule
