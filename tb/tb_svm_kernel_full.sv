// Full-size run of the cubic SVM kernel at its default parameters: the
// reference workload of 207 support vectors of 81 features each, evaluated
// against one 81-element feature vector, streamed one element pair per cycle
// with no gap. Values are small integers (support vectors in quarters), so
// every dot product is exact and each kernel value must match, bit for bit,
// (dot + 1)^2 * (dot + 1) rounded to single precision after each product.
// Timing: the first result 159 cycles after the first element (the published
// design reports 161), then one result every 81 cycles, so the last one
// 159 + 206 * 81 = 16845 cycles after the first element (168.45 us at
// 100 MHz; published 168.5 us). busy must stay high throughout and drop after
// the last result; no buffer may overflow.
module tb_svm_kernel_full;
  import db_pkg::*;
  import tb_fp_pkg::*;
  localparam int NVEC = 207;
  localparam int NF   = 81;

  logic  clk = 1'b0, rst = 1'b1;
  fp32_t data = '0, sv = '0;
  logic  dv = 1'b0, dl = 1'b0;
  fp32_t result, dot;
  logic  rdy, acc_rdy, busy, overflow;
  sid_t  rsid;
  int checks = 0, failures = 0;
  longint cycle = 0;
  fp32_t expq [$];
  longint rdy_t [$];
  int busy_low = 0, n_in_order = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  svm_poly_kernel dut (
    .clk(clk), .rst(rst), .data(data), .support_vectors(sv), .data_valid(dv), .data_last(dl),
    .result(result), .result_ready(rdy), .result_sid(rsid), .accumulator_ready(acc_rdy),
    .dot_product(dot), .busy(busy), .overflow(overflow)
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
      if (rdy) begin
        fp32_t e;
        chk(rsid == sid_t'(rdy_t.size()), "results in vector order");
        rdy_t.push_back(cycle);
        e = expq.pop_front();
        chk(result == e, $sformatf("kernel %h expected %h", result, e));
      end
      if (overflow) chk(1'b0, "buffer overflow");
    end
  end

  initial begin : watchdog
    repeat (NVEC * NF + 2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp32_t x [NF];
    longint t0;
    foreach (x[i]) x[i] = real_to_fp32(real'(int'($urandom_range(14)) - 7));
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
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
        if (!busy) busy_low++;
        @(negedge clk);
      end
      expq.push_back(kernel_ref(s));
    end
    dv = 1'b0; dl = 1'b0;
    while (rdy_t.size() < NVEC && cycle - t0 < NVEC * NF + 1000) begin
      #1;
      if (!busy) busy_low++;
      @(negedge clk);
    end
    chk(rdy_t.size() == NVEC, $sformatf("%0d of %0d kernel results", rdy_t.size(), NVEC));
    if (rdy_t.size() == NVEC) begin
      $display("first kernel result after %0d cycles, last after %0d cycles",
               rdy_t[0] - t0, rdy_t[NVEC-1] - t0);
      chk(rdy_t[0] - t0 == 159, "first result after 159 cycles");
      chk(rdy_t[NVEC-1] - t0 == 159 + (NVEC - 1) * NF, "last result after 159 + 206 * 81 cycles");
    end
    chk(busy_low == 0, $sformatf("busy low for %0d cycles during the run", busy_low));
    repeat (2) @(negedge clk);
    chk(!busy, "busy low after the last result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
