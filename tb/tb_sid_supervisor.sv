// Testbench of the SID supervisor (adder latency 11): random issue patterns
// and SIDs from a small range so that sets repeat inside the pipeline. A
// software copy of the pipeline gives the expected sum_valid, SID at the
// output, sum_internal_compare, sum_input_compare and pipe_has every cycle.
module tb_sid_supervisor;
  import db_pkg::*;
  localparam int P = 11;
  logic clk = 1'b0, rst = 1'b1;
  logic add_valid = 1'b0, in_valid = 1'b0;
  sid_t add_sid = '0, in_sid = '0;
  logic sum_valid, internal_cmp, input_cmp;
  sid_t sid_sum;
  logic [NSID-1:0] pipe_has;
  logic m_v [P];
  sid_t m_s [P];
  int checks = 0, failures = 0;
  int n_int = 0, n_inp = 0;

  always #5 clk = ~clk;

  sid_supervisor #(.P(P)) dut (
    .clk(clk), .rst(rst), .add_valid_in(add_valid), .sid_adder_in(add_sid),
    .input_valid(in_valid), .sid_input(in_sid),
    .sum_valid(sum_valid), .sid_sum(sid_sum),
    .sum_internal_compare(internal_cmp), .sum_input_compare(input_cmp), .pipe_has(pipe_has)
  );

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (m_v[i]) begin m_v[i] = 1'b0; m_s[i] = '0; end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      logic [NSID-1:0] e_has;
      logic e_int, e_inp;
      add_valid = ($urandom_range(3) != 0);
      add_sid   = sid_t'($urandom_range(5));
      in_valid  = ($urandom_range(1) != 0);
      in_sid    = sid_t'($urandom_range(5));
      #1;
      e_has = '0;
      for (int i = 0; i < P - 1; i++) if (m_v[i]) e_has[m_s[i]] = 1'b1;
      e_int = m_v[P-1] && e_has[m_s[P-1]];
      e_inp = m_v[P-1] && in_valid && in_sid == m_s[P-1];
      n_int += int'(e_int);
      n_inp += int'(e_inp);
      checks++;
      if (sum_valid != m_v[P-1] || (m_v[P-1] && sid_sum != m_s[P-1]) || pipe_has != e_has
          || internal_cmp != e_int || input_cmp != e_inp) begin
        failures++;
        if (failures < 10) $display("FAIL: t=%0d", t);
      end
      @(posedge clk);
      for (int i = P - 1; i > 0; i--) begin m_v[i] = m_v[i-1]; m_s[i] = m_s[i-1]; end
      m_v[0] = add_valid;
      m_s[0] = add_sid;
      @(negedge clk);
    end
    checks++;
    if (n_int == 0 || n_inp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
