// Testbench of the single-precision multiplier with latency 6: a new random
// pair every cycle (mixed signs, a wide exponent range, zeros, infinities,
// 0 x inf, NaN); each product must appear exactly 6 cycles later and equal
// the exact double-precision product rounded to single precision.
module tb_multiplier_with_latency;
  import db_pkg::*;
  import tb_fp_pkg::*;
  localparam int P = 6;
  localparam int N = 4000;

  logic clk = 1'b0, rst = 1'b1;
  fp32_t a = '0, b = '0, sum;
  int checks = 0, failures = 0;
  fp32_t expq [$];

  always #5 clk = ~clk;

  multiplier_with_latency #(.Q(P)) dut (.clk(clk), .rst(rst), .a(a), .b(b), .prod(sum));

  function automatic fp32_t rnd_fp();
    logic [7:0] e;
    e = 8'(64 + $urandom_range(126));
    return {1'($urandom_range(1)), e, 23'($urandom)};
  endfunction

  function automatic fp32_t ref_add(input fp32_t x, input fp32_t y);
    if ((x[30:23] == 8'hFF && x[22:0] != 0) || (y[30:23] == 8'hFF && y[22:0] != 0)) return FP_QNAN;
    if (x[30:23] == 8'hFF || y[30:23] == 8'hFF) begin
      if (x[30:0] == 0 || y[30:0] == 0) return FP_QNAN;
      return {x[31] ^ y[31], 8'hFF, 23'd0};
    end
    if (x[30:0] == 0 || y[30:0] == 0) return {x[31] ^ y[31], 31'd0};
    return real_to_fp32(fp32_to_real(x) * fp32_to_real(y));
  endfunction

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < N + P; t++) begin
      if (t < N) begin
        a = rnd_fp();
        case (t % 8)
          0: b = {1'($urandom_range(1)), 8'd127, 23'($urandom_range(7))}; // near 1.0
          1: b = {1'($urandom_range(1)), 8'd127 - 8'($urandom_range(60)), 23'($urandom)};
          2: b = (t % 64 == 2) ? 32'h8000_0000 : rnd_fp();
          3: b = (t % 96 == 3) ? 32'h7F80_0000 : ((t % 96 == 11) ? 32'h7FC0_0001 : rnd_fp());
          default: b = rnd_fp();
        endcase
        if (t % 200 == 5) begin a = 32'hFF80_0000; b = 32'h0; end
        expq.push_back(ref_add(a, b));
      end
      @(posedge clk);
      #1;
      if (t >= P - 1 && expq.size() > 0 && t - (P - 1) < N) begin
        fp32_t e;
        e = expq.pop_front();
        checks++;
        if (sum != e) begin
          failures++;
          if (failures < 10) $display("FAIL: sum %h expected %h", sum, e);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
