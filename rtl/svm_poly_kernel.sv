// Cubic polynomial kernel for a support vector machine:
//     k = ( sum_i x_i * x'_i + 1 )^3
// computed in IEEE-754 single precision on a stream of element pairs.
//
// One pair (data = x_i, support_vectors = x'_i) enters per cycle with
// data_valid; data_last marks the last pair of a dot product. Products come
// from a multiplier of latency Q and are summed by the multi-set delayed-
// buffering accumulator (adder latency P), which accepts the next dot product
// immediately behind the previous one. Each dot product then has 1.0 added
// (adder, latency P) and is cubed (two multipliers, latency 2Q).
// data_valid and data_last are delayed by Q to stay beside their products;
// accumulator_ready is the accumulator's own result strobe, and result_ready
// is that strobe delayed by P + 2Q so it lines up with result. result_sid
// numbers the vector the result belongs to (0, 1, 2, ... modulo 2**SID_W):
// vectors of equal length given back to back, the kernel's normal use, come
// out in order, but a short vector may overtake a long one in front of it.
// This
// structure, the constant c = 1 and exponent 3, and P = 11, Q = 6 follow the
// published design.
//
// busy is high from the first element of a vector presented at the input
// until the kernel output of the last vector that has entered: it counts
// vectors started minus kernel results produced (this counter is the
// design's own reading of a busy signal used in measurements). overflow
// reports the accumulator's sticky buffer-overflow flag.
module svm_poly_kernel
  import db_pkg::*;
#(
  parameter int unsigned P = 11,
  parameter int unsigned Q = 6
) (
  input  logic  clk,
  input  logic  rst,
  input  fp32_t data,
  input  fp32_t support_vectors,
  input  logic  data_valid,
  input  logic  data_last,
  output fp32_t result,
  output logic  result_ready,
  output sid_t  result_sid,
  output logic  accumulator_ready,
  output fp32_t dot_product,
  output logic  busy,
  output logic  overflow
);
  // MAC: multiplier with latency and accumulator
  fp32_t prod;
  logic  prod_valid, prod_last;
  op_t   acc_op;
  sid_t  acc_sid;

  multiplier_with_latency #(.Q(Q)) u_mul (
    .clk(clk), .rst(rst), .a(data), .b(support_vectors), .prod(prod)
  );

  delay_line #(.W(2), .D(Q)) u_ctl_dly (
    .clk(clk), .rst(rst),
    .din({data_valid, data_last}), .dout({prod_valid, prod_last})
  );

  db_accumulator #(.P(P)) u_acc (
    .clk(clk), .rst(rst),
    .data(prod), .data_valid(prod_valid), .data_last(prod_last),
    .result(dot_product), .result_rdy(accumulator_ready), .result_sid(acc_sid),
    .overflow(overflow), .op(acc_op)
  );

  // + c (c = 1)
  fp32_t shifted;
  adder_with_latency #(.P(P)) u_add_c (
    .clk(clk), .rst(rst), .a(dot_product), .b(FP_ONE), .sum(shifted)
  );

  // ^3
  cubic_power #(.Q(Q)) u_cube (
    .clk(clk), .rst(rst), .x(shifted), .y(result)
  );

  delay_line #(.W(1 + SID_W), .D(P + 2 * Q)) u_rdy_dly (
    .clk(clk), .rst(rst), .din({accumulator_ready, acc_sid}), .dout({result_ready, result_sid})
  );

  // busy: vectors started and not yet through the kernel
  logic        in_vector;
  logic [15:0] pending;
  logic        vec_start;
  assign vec_start = data_valid && !in_vector;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_vector <= 1'b0;
      pending   <= '0;
    end else begin
      if (data_valid) in_vector <= !data_last;
      pending <= pending + 16'(vec_start) - 16'(result_ready);
    end
  end

  assign busy = vec_start || (pending != 16'd0);
endmodule
