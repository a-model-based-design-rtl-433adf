// Self-checking testbench of the multi-set delayed-buffering accumulator at
// its default size (adder latency 11, buffers of 6 and 8 cells).
//  1. The two series of the reference experiment, streamed back to back
//     without a gap: 50 terms of sum 1/k! (e) and 200 terms of the Leibniz
//     series 4(-1)^k/(2k+1) (pi). Results are compared with a double-
//     precision sum (relative error below 1e-5); the first result must come
//     99 cycles after the first element and the second 200 cycles after the
//     first, the timing of the reference experiment.
//  2. 600 random vectors of integer-valued elements (every partial sum is
//     exact in single precision, so results must match bit for bit), lengths
//     1 to 40 with bursts of 1- and 2-element vectors, with and without idle
//     cycles between elements. Results are matched by their set identifier.
// Every kind of scheduling decision of the main control logic must occur at
// least once; a buffer overflow is a failure.
module tb_db_accumulator;
  import db_pkg::*;
  import tb_fp_pkg::*;

  logic  clk = 1'b0;
  logic  rst = 1'b1;
  fp32_t data = '0;
  logic  data_valid = 1'b0, data_last = 1'b0;
  fp32_t result;
  logic  result_rdy, overflow;
  sid_t  result_sid;
  op_t   op;

  int checks = 0, failures = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  db_accumulator dut (
    .clk(clk), .rst(rst), .data(data), .data_valid(data_valid), .data_last(data_last),
    .result(result), .result_rdy(result_rdy), .result_sid(result_sid),
    .overflow(overflow), .op(op)
  );

  // expected result per set identifier
  real    exp_val  [NSID];
  logic   exp_busy [NSID];
  logic   exp_exact[NSID];
  longint exp_t0   [NSID];
  longint lat      [NSID];
  int     sets_sent = 0, sets_done = 0;
  int     op_count [9];

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // output monitor
  always @(posedge clk) begin
    if (!rst) begin
      op_count[int'(op)]++;
      if (result_rdy) begin
        check(exp_busy[result_sid], $sformatf("result for unexpected set %0d", result_sid));
        if (exp_exact[result_sid])
          check(result == real_to_fp32(exp_val[result_sid]),
                $sformatf("set %0d: got %h expected %h", result_sid, result, real_to_fp32(exp_val[result_sid])));
        else
          check((fp32_to_real(result) - exp_val[result_sid]) <= 1e-5 * (exp_val[result_sid] < 0 ? -exp_val[result_sid] : exp_val[result_sid]) &&
                (exp_val[result_sid] - fp32_to_real(result)) <= 1e-5 * (exp_val[result_sid] < 0 ? -exp_val[result_sid] : exp_val[result_sid]),
                $sformatf("set %0d: got %f expected %f", result_sid, fp32_to_real(result), exp_val[result_sid]));
        lat[result_sid]      = cycle - exp_t0[result_sid];
        exp_busy[result_sid] = 1'b0;
        sets_done++;
      end
      if (overflow) begin
        failures++;
        $display("FAIL: buffer overflow");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  // send one vector; gap_pct = chance of an idle cycle before each element
  task automatic send_vector(input fp32_t v [], input int gap_pct, input logic exact);
    sid_t s;
    real  acc = 0.0;
    s = sid_t'(sets_sent);
    // the set identifier must be free again before it is reused
    while (exp_busy[s]) @(negedge clk);
    foreach (v[i]) acc += fp32_to_real(v[i]);
    exp_val[s]   = acc;
    exp_exact[s] = exact;
    exp_busy[s]  = 1'b1;
    foreach (v[i]) begin
      while (int'($urandom_range(99)) < gap_pct) begin
        data_valid = 1'b0;
        data_last  = 1'b0;
        @(negedge clk);
      end
      data       = v[i];
      data_valid = 1'b1;
      data_last  = (i == v.size() - 1);
      if (i == 0) exp_t0[s] = cycle;
      @(negedge clk);
    end
    data_valid = 1'b0;
    data_last  = 1'b0;
    sets_sent++;
  endtask

  task automatic wait_idle();
    int n = 0;
    while (sets_done != sets_sent && n < 5000) begin
      @(negedge clk);
      n++;
    end
    check(sets_done == sets_sent, $sformatf("%0d of %0d results missing", sets_sent - sets_done, sets_sent));
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp32_t v [];
    real   fact, x;
    longint t_first;
    foreach (exp_busy[i]) begin
      exp_busy[i] = 1'b0;
      exp_exact[i] = 1'b0;
    end
    foreach (op_count[i]) op_count[i] = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);

    // 1. e and pi series back to back
    v = new[50];
    fact = 1.0;
    for (int k = 0; k < 50; k++) begin
      if (k > 0) fact = fact * k;
      v[k] = real_to_fp32(1.0 / fact);
    end
    t_first = cycle;
    send_vector(v, 0, 1'b0);
    v = new[200];
    for (int k = 0; k < 200; k++) begin
      x = 4.0 / (2.0 * k + 1.0);
      v[k] = real_to_fp32((k % 2 == 1) ? -x : x);
    end
    send_vector(v, 0, 1'b0);
    wait_idle();
    $display("e  series: %0d elements, result after %0d cycles", 50, lat[0]);
    $display("pi series: %0d elements, result after %0d cycles (from its first element)", 200, lat[1]);
    // reference timing: first result 99 cycles after the first element, the
    // second one 200 cycles after the first
    check(lat[0] == 99, $sformatf("e series latency %0d, expected 99", lat[0]));
    check(lat[1] + 50 - lat[0] == 200, $sformatf("second result %0d cycles after the first, expected 200", lat[1] + 50 - lat[0]));

    // 2. random integer-valued vectors
    for (int n = 0; n < 600; n++) begin
      int len, gap, kind;
      kind = int'($urandom_range(3));
      case (kind)
        0:       len = 1 + $urandom_range(1);
        1:       len = 1 + $urandom_range(5);
        default: len = 1 + $urandom_range(39);
      endcase
      gap = (n % 100 < 50) ? 0 : 30;
      v = new[len];
      foreach (v[i]) v[i] = real_to_fp32(real'(int'($urandom_range(200)) - 100));
      send_vector(v, gap, 1'b1);
    end
    wait_idle();

    for (int i = 1; i < 9; i++) begin
      $display("operation %s: %0d", op_t'(i), op_count[i]);
      check(op_count[i] > 0, $sformatf("operation %s never occurred", op_t'(i)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
