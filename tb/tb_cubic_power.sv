// Testbench of the cubic power block (latency 2 x 6 = 12 cycles): a random x
// every cycle; y must equal fl(fl(x*x)*x), the two single-precision roundings
// of the two-multiplier cascade, exactly 12 cycles later.
module tb_cubic_power;
  import db_pkg::*;
  import tb_fp_pkg::*;
  localparam int Q = 6;
  localparam int N = 3000;

  logic clk = 1'b0, rst = 1'b1;
  fp32_t x = '0, y;
  int checks = 0, failures = 0;
  fp32_t expq [$];

  always #5 clk = ~clk;

  cubic_power #(.Q(Q)) dut (.clk(clk), .rst(rst), .x(x), .y(y));

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < N + 2 * Q; t++) begin
      if (t < N) begin
        fp32_t sq;
        x  = {1'($urandom_range(1)), 8'(100 + $urandom_range(50)), 23'($urandom)};
        if (t % 50 == 7) x = 32'h0;
        sq = (x[30:0] == 0) ? 32'h0 : real_to_fp32(fp32_to_real(x) * fp32_to_real(x));
        expq.push_back((x[30:0] == 0) ? {x[31], 31'd0} : real_to_fp32(fp32_to_real(sq) * fp32_to_real(x)));
      end
      @(posedge clk);
      #1;
      if (t >= 2 * Q - 1 && t - (2 * Q - 1) < N) begin
        fp32_t e;
        e = expq.pop_front();
        checks++;
        if (y != e) begin
          failures++;
          if (failures < 10) $display("FAIL: y %h expected %h", y, e);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
