// Cubic power: y = x^3 in single precision, as the published design builds it, a
// cascade of two multipliers. The first forms x*x; x is delayed by Q cycles
// to meet it at the second, which forms (x*x)*x. Latency 2Q cycles, one new
// x per cycle. Q = 6 as in the published design.
module cubic_power
  import db_pkg::*;
#(
  parameter int unsigned Q = 6
) (
  input  logic  clk,
  input  logic  rst,
  input  fp32_t x,
  output fp32_t y
);
  fp32_t x_sq, x_dly;

  multiplier_with_latency #(.Q(Q)) u_square (
    .clk(clk), .rst(rst), .a(x), .b(x), .prod(x_sq)
  );

  delay_line #(.W(FP_W), .D(Q)) u_align (
    .clk(clk), .rst(rst), .din(x), .dout(x_dly)
  );

  multiplier_with_latency #(.Q(Q)) u_cube (
    .clk(clk), .rst(rst), .a(x_sq), .b(x_dly), .prod(y)
  );
endmodule
