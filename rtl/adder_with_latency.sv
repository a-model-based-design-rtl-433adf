// Adder with latency: an IEEE-754 single-precision adder followed by a delay
// of P clock cycles, so a + b issued in cycle t appears at sum in cycle t+P.
// It follows the published model of a pipelined floating-point adder, a
// combinational adder cascaded with a z^-P delay; a synthesis tool can retime
// the registers into the adder. One new addition can be issued every cycle.
// Rounding is to nearest even, subnormals are flushed to zero (see db_pkg).
// P = 11 is the latency of the adder of the published design.
module adder_with_latency
  import db_pkg::*;
#(
  parameter int unsigned P = 11
) (
  input  logic  clk,
  input  logic  rst,
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t sum
);
  delay_line #(.W(FP_W), .D(P)) u_delay (
    .clk (clk),
    .rst (rst),
    .din (fp32_add(a, b)),
    .dout(sum)
  );
endmodule
