// End-to-end testbench of the cubic SVM kernel at its default latencies
// (adder 11, multiplier 6).
//  1. A stream of NVEC support vectors of 81 elements against one 81-element
//     feature vector, one element pair per cycle with no gap, as in the
//     reference experiment. Values are small integers so the dot products
//     and the +1 are exact; the expected kernel value is the dot product
//     plus one, squared and multiplied once more with single-precision
//     rounding after each product, which the result must match bit for bit.
//     The first kernel output must come 159 cycles after the first element
//     (6 multiplier + 130 accumulator + 11 adder + 12 cubic power; the
//     published design reports 161) and each further one 81 cycles after the
//     previous, one result per vector length as published.
//  2. Short vectors (1 to 12 pairs) with random idle cycles, to bring in the
//     accumulator's lone-element and buffer-to-buffer cases.
// Counted and required: each kind of accumulator operation, accumulator
// results ahead of kernel results by P + 2Q = 23 cycles, busy high through
// the whole stream and low afterwards; no buffer overflow.
module tb_svm_poly_kernel;
  import db_pkg::*;
  import tb_fp_pkg::*;
  localparam int NVEC = 12;
  localparam int NF   = 81;

  logic  clk = 1'b0, rst = 1'b1;
  fp32_t data = '0, sv = '0;
  logic  dv = 1'b0, dl = 1'b0;
  fp32_t result, dot;
  logic  rdy, acc_rdy, busy, overflow;
  int checks = 0, failures = 0;
  longint cycle = 0;
  fp32_t exp_val [NSID];
  logic   exp_pend [NSID];
  int     n_exp = 0, n_got = 0;
  sid_t   rsid;
  longint rdy_t [$];
  longint acc_t [$];
  int op_count [9];
  int busy_low_in_stream = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  svm_poly_kernel dut (
    .clk(clk), .rst(rst), .data(data), .support_vectors(sv), .data_valid(dv), .data_last(dl),
    .result(result), .result_ready(rdy), .result_sid(rsid), .accumulator_ready(acc_rdy), .dot_product(dot),
    .busy(busy), .overflow(overflow)
  );

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  function automatic fp32_t kernel_ref(input real s);
    fp32_t t, sq;
    t  = real_to_fp32(s + 1.0);
    sq = real_to_fp32(fp32_to_real(t) * fp32_to_real(t));
    return real_to_fp32(fp32_to_real(sq) * fp32_to_real(t));
  endfunction

  always @(posedge clk) begin
    if (!rst) begin
      op_count[int'(dut.u_acc.op)]++;
      if (acc_rdy) acc_t.push_back(cycle);
      if (rdy) begin
        rdy_t.push_back(cycle);
        n_got++;
        chk(exp_pend[rsid], $sformatf("result for vector %0d not expected", rsid));
        exp_pend[rsid] = 1'b0;
        chk(result == exp_val[rsid], $sformatf("kernel %h expected %h (vector %0d)", result, exp_val[rsid], rsid));
        chk(acc_t.size() > 0 && cycle - acc_t.pop_front() == longint'(11 + 2 * 6), "result_ready 23 cycles after accumulator_ready");
      end
      if (overflow) chk(1'b0, "buffer overflow");
    end
  end

  initial begin : watchdog
    repeat (NVEC * NF + 20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp32_t x [NF];
    longint t0;
    foreach (op_count[i]) op_count[i] = 0;
    foreach (exp_pend[i]) exp_pend[i] = 1'b0;
    foreach (x[i]) x[i] = real_to_fp32(real'(int'($urandom_range(14)) - 7));
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    chk(!busy, "busy low before the first element");

    // 1. full-length stream
    t0 = cycle;
    for (int v = 0; v < NVEC; v++) begin
      real s;
      s = 0.0;
      for (int i = 0; i < NF; i++) begin
        sv   = real_to_fp32(real'(int'($urandom_range(14)) - 7) / 4.0);
        data = x[i];
        dv   = 1'b1;
        dl   = (i == NF - 1);
        s   += fp32_to_real(data) * fp32_to_real(sv);
        #1;
        if (!busy) busy_low_in_stream++;
        @(negedge clk);
      end
      chk(sid_t'(n_exp) == sid_t'(v), "vector numbering");
      exp_val[sid_t'(n_exp)]  = kernel_ref(s);
      exp_pend[sid_t'(n_exp)] = 1'b1;
      n_exp++;
    end
    dv = 1'b0; dl = 1'b0;
    while (rdy_t.size() < NVEC && cycle - t0 < 10000) @(negedge clk);
    chk(rdy_t.size() == NVEC, "all kernel results produced");
    if (rdy_t.size() == NVEC) begin
      $display("first kernel result %0d cycles after the first element; last after %0d",
               rdy_t[0] - t0, rdy_t[NVEC-1] - t0);
      chk(rdy_t[0] - t0 == 159, $sformatf("first kernel latency %0d, expected 159", rdy_t[0] - t0));
      for (int v = 1; v < NVEC; v++)
        chk(rdy_t[v] - rdy_t[v-1] == NF, $sformatf("kernel result %0d after %0d cycles, expected %0d", v, rdy_t[v] - rdy_t[v-1], NF));
    end
    chk(busy_low_in_stream == 0, "busy high during the stream");
    repeat (2) @(negedge clk);
    chk(!busy, "busy low after the last kernel result");

    // 2. short vectors with gaps
    for (int v = 0; v < 300; v++) begin
      int len;
      real s;
      s = 0.0;
      len = 1 + $urandom_range((v % 3 == 0) ? 1 : 11);
      // the vector number must be free before it is used again
      while (exp_pend[sid_t'(n_exp)]) begin dv = 1'b0; dl = 1'b0; @(negedge clk); end
      for (int i = 0; i < len; i++) begin
        while ($urandom_range(3) == 0) begin dv = 1'b0; dl = 1'b0; @(negedge clk); end
        sv   = real_to_fp32(real'(int'($urandom_range(14)) - 7));
        data = x[i];
        dv   = 1'b1;
        dl   = (i == len - 1);
        s   += fp32_to_real(data) * fp32_to_real(sv);
        @(negedge clk);
      end
      exp_val[sid_t'(n_exp)]  = kernel_ref(s);
      exp_pend[sid_t'(n_exp)] = 1'b1;
      n_exp++;
    end
    dv = 1'b0; dl = 1'b0;
    repeat (300) @(negedge clk);
    chk(n_got == n_exp, $sformatf("%0d kernel results missing", n_exp - n_got));
    chk(!busy, "busy low at the end");

    for (int i = 1; i < 9; i++) begin
      $display("accumulator operation %s: %0d", op_t'(i), op_count[i]);
      chk(op_count[i] > 0, $sformatf("accumulator operation %s never occurred", op_t'(i)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
