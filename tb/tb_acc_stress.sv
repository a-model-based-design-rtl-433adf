// Stress run of the delayed-buffering accumulator at its default size. Six
// profiles of 10000 vectors each are streamed back to back, one element per
// cycle. Short vectors put the most operands of different sets in the
// buffers at once, so the lengths are random:
//   0: 1..30                      3: 1..5
//   1: half 1..3, half 10..39     4: a quarter 8..15, the rest 1..2
//   2: 1..12                      5: 1..30 with random idle cycles
// Elements are random integers in [-8, 8], so every sum is exact and is
// checked bit for bit. Results are matched by result_sid, since a short
// vector may finish before a longer one ahead of it. A tag must not be
// reused while its vector is still in flight, every vector must produce
// exactly one result, and no buffer may overflow. The peak buffer
// occupancy is reported.
module tb_acc_stress;
  import db_pkg::*;
  import tb_fp_pkg::*;
  localparam int NPROF = 6;
  localparam int NVEC  = 10000;
  localparam int SEED  = 1;

  logic  clk = 1'b0, rst = 1'b1;
  fp32_t data = '0;
  logic  dv = 1'b0, dl = 1'b0;
  fp32_t result;
  logic  rdy, overflow;
  sid_t  rsid;
  op_t   op;
  int checks = 0, failures = 0;
  int n_res = 0, peak_ib = 0, peak_rb = 0;
  real  exp_sum [NSID];
  logic pend    [NSID];

  always #5 clk = ~clk;

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
      int ib, rb;
      ib = 0;
      rb = 0;
      foreach (dut.ib_cell_valid[i]) ib += int'(dut.ib_cell_valid[i]);
      foreach (dut.rb_cell_valid[i]) rb += int'(dut.rb_cell_valid[i]);
      if (ib > peak_ib) peak_ib = ib;
      if (rb > peak_rb) peak_rb = rb;
      if (rdy) begin
        n_res++;
        chk(pend[rsid] === 1'b1, $sformatf("result for SID %0d, which is not in flight", rsid));
        chk(result == real_to_fp32(exp_sum[rsid]),
            $sformatf("SID %0d: sum %f expected %f", rsid, fp32_to_real(result), exp_sum[rsid]));
        pend[rsid] = 1'b0;
      end
      if (overflow) chk(1'b0, "buffer overflow");
    end
  end

  initial begin : watchdog
    repeat (NPROF * NVEC * 60 + 2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nsent;
    void'($urandom(SEED));
    foreach (pend[i]) pend[i] = 1'b0;
    nsent = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    for (int p = 0; p < NPROF; p++) begin
      for (int v = 0; v < NVEC; v++) begin
        int   len;
        sid_t s;
        real  x;
        case (p)
          0, 5:    len = 1 + $urandom_range(29);
          1:       len = ($urandom_range(1) == 1) ? 1 + $urandom_range(2) : 10 + $urandom_range(29);
          2:       len = 1 + $urandom_range(11);
          3:       len = 1 + $urandom_range(4);
          default: len = ($urandom_range(3) == 0) ? 8 + $urandom_range(7) : 1 + $urandom_range(1);
        endcase
        s = sid_t'(nsent);
        chk(pend[s] !== 1'b1, $sformatf("SID %0d reused while its vector is in flight", s));
        pend[s]    = 1'b1;
        exp_sum[s] = 0.0;
        for (int i = 0; i < len; i++) begin
          if (p == 5 && $urandom_range(3) == 0) begin
            dv = 1'b0;
            dl = 1'b0;
            @(negedge clk);
          end
          x    = real'(int'($urandom_range(16)) - 8);
          data = real_to_fp32(x);
          dv   = 1'b1;
          dl   = (i == len - 1);
          exp_sum[s] += x;
          @(negedge clk);
        end
        nsent++;
      end
    end
    dv = 1'b0; dl = 1'b0;
    repeat (300) @(negedge clk);
    chk(n_res == nsent, $sformatf("%0d results for %0d vectors", n_res, nsent));
    foreach (pend[i]) chk(pend[i] !== 1'b1, $sformatf("no result for SID %0d", i));
    $display("%0d vectors, peak IBUF occupancy %0d of %0d, peak RBUF occupancy %0d of %0d",
             nsent, peak_ib, dut.IBUF_N, peak_rb, dut.RBUF_N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
