// Throughput run of the delayed-buffering accumulator at its default size:
// a continuous stream of 200 vectors of 100 elements each, one element per
// cycle with no gap, the stream used to characterise the accumulator. The
// elements are random values in [-8, 8) with 12 significant bits; each
// result is checked against the double-precision sum (within 1e-6 of the sum
// of magnitudes), results must come in vector order, the first 49 cycles
// after the last element of its vector (the published accumulator latency),
// then one every 100 cycles, and no buffer may overflow.
module tb_acc_stream;
  import db_pkg::*;
  import tb_fp_pkg::*;
  localparam int NVEC = 200;
  localparam int NE   = 100;

  logic  clk = 1'b0, rst = 1'b1;
  fp32_t data = '0;
  logic  dv = 1'b0, dl = 1'b0;
  fp32_t result;
  logic  rdy, overflow;
  sid_t  rsid;
  op_t   op;
  int checks = 0, failures = 0;
  longint cycle = 0;
  real exp_sum [$], exp_mag [$];
  longint rdy_t [$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  db_accumulator dut (
    .clk(clk), .rst(rst), .data(data), .data_valid(dv), .data_last(dl),
    .result(result), .result_rdy(rdy), .result_sid(rsid), .overflow(overflow), .op(op)
  );

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  always @(posedge clk) begin
    if (!rst) begin
      if (rdy) begin
        real e, m, d;
        chk(rsid == sid_t'(rdy_t.size()), "results in vector order");
        rdy_t.push_back(cycle);
        e = exp_sum.pop_front();
        m = exp_mag.pop_front();
        d = fp32_to_real(result) - e;
        if (d < 0) d = -d;
        chk(d <= 1e-6 * m, $sformatf("sum %f expected %f", fp32_to_real(result), e));
      end
      if (overflow) chk(1'b0, "buffer overflow");
    end
  end

  initial begin : watchdog
    repeat (NVEC * NE + 2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    t0 = cycle;
    for (int v = 0; v < NVEC; v++) begin
      real s, m, x;
      s = 0.0;
      m = 0.0;
      for (int i = 0; i < NE; i++) begin
        x    = (real'(int'($urandom_range(4095))) - 2048.0) / 256.0;
        data = real_to_fp32(x);
        dv   = 1'b1;
        dl   = (i == NE - 1);
        s   += x;
        m   += (x < 0) ? -x : x;
        @(negedge clk);
      end
      exp_sum.push_back(s);
      exp_mag.push_back(m);
    end
    dv = 1'b0; dl = 1'b0;
    repeat (500) @(negedge clk);
    chk(rdy_t.size() == NVEC, $sformatf("%0d of %0d results", rdy_t.size(), NVEC));
    if (rdy_t.size() == NVEC) begin
      $display("first result after %0d cycles, last after %0d cycles", rdy_t[0] - t0, rdy_t[NVEC-1] - t0);
      chk(rdy_t[0] - t0 == NE + 49, "first result 49 cycles after the last element of its vector");
      for (int v = 1; v < NVEC; v++)
        chk(rdy_t[v] - rdy_t[v-1] == NE, "one result every 100 cycles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
