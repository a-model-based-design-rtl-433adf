// Testbench of the input buffer (6 cells): random writes and reads in all
// three read modes, keyed by SIDs from a small range so that several cells
// share a set. A reference model of the cells (first empty or freed cell written,
// first matching cells read) predicts a_data, b_data, sum_compare,
// input_compare, internal_compare, full and overflow every cycle. Writes
// into a full buffer are attempted on purpose, with and without a read in
// the same cycle (a write may take the cell being read).
module tb_ibuf;
  import db_pkg::*;
  localparam int N = 6;
  logic clk = 1'b0, rst = 1'b1;
  logic write = 1'b0, read = 1'b0;
  item_t in_item = '0;
  ib_mode_t mode = IB_NONE;
  sid_t key = '0, sid_input = '0, sid_sum = '0;
  item_t a_data, b_data;
  logic sum_cmp, in_cmp, int_cmp, full, ovf;
  logic cv [N];
  sid_t cs [N];
  item_t m_c [N];
  logic  m_v [N];
  logic  m_ovf = 1'b0;
  int checks = 0, failures = 0, n_full = 0, n_pair = 0, n_swap = 0;

  always #5 clk = ~clk;

  ibuf #(.N(N)) dut (
    .clk(clk), .rst(rst), .write(write), .input_in(in_item), .read(read), .mode(mode), .key(key),
    .sid_input(sid_input), .sid_sum(sid_sum), .a_data(a_data), .b_data(b_data),
    .sum_compare(sum_cmp), .input_compare(in_cmp), .internal_compare(int_cmp),
    .full(full), .overflow(ovf), .cell_valid(cv), .cell_sid(cs)
  );

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (m_v[i]) m_v[i] = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 5000; t++) begin
      int cnt [4];
      int f1, f2, fe, nvalid;
      logic e_sum, e_in, e_int;
      item_t ea, eb;
      // choose stimulus
      foreach (cnt[s]) cnt[s] = 0;
      nvalid = 0;
      foreach (m_v[i]) if (m_v[i]) begin cnt[m_c[i].sid]++; nvalid++; end
      write     = ($urandom_range(99) < ((t / 500) % 2 == 0 ? 70 : 40));
      in_item   = '{data: $urandom, sid: sid_t'($urandom_range(3))};
      sid_input = sid_t'($urandom_range(3));
      sid_sum   = sid_t'($urandom_range(3));
      key       = sid_t'($urandom_range(3));
      read      = 1'b0;
      mode      = IB_NONE;
      if ($urandom_range(1) == 1) begin
        if (cnt[key] >= 2 && $urandom_range(1) == 1) begin
          read = 1'b1; mode = IB_PAIR;
        end else if (cnt[key] >= 1) begin
          read = 1'b1; mode = ($urandom_range(1) == 1) ? IB_A : IB_B;
        end
      end
      #1;
      // reference
      f1 = -1; f2 = -1; fe = -1;
      for (int i = 0; i < N; i++) begin
        if (m_v[i] && m_c[i].sid == key) begin
          if (f1 < 0) f1 = i; else if (f2 < 0) f2 = i;
        end
      end
      // a write may take a cell that is empty or is read in this cycle
      for (int i = 0; i < N; i++)
        if (fe < 0 && (!m_v[i] || (read && (i == f1 || (mode == IB_PAIR && i == f2))))) fe = i;
      e_sum = 1'b0; e_in = 1'b0; e_int = 1'b0;
      foreach (cnt[s]) if (cnt[s] >= 2) e_int = 1'b1;
      foreach (m_v[i]) if (m_v[i]) begin
        if (m_c[i].sid == sid_sum) e_sum = 1'b1;
        if (m_c[i].sid == sid_input) e_in = 1'b1;
      end
      ea = '0; eb = '0;
      if (mode == IB_A || mode == IB_PAIR) ea = m_c[f1];
      if (mode == IB_B) eb = m_c[f1];
      if (mode == IB_PAIR) eb = m_c[f2];
      chk(full == (nvalid == N), $sformatf("t=%0d full", t));
      chk(sum_cmp == e_sum && in_cmp == e_in && int_cmp == e_int, $sformatf("t=%0d compare flags", t));
      if (read) chk(a_data == ea && b_data == eb, $sformatf("t=%0d read mode %0d data", t, mode));
      chk(ovf == m_ovf, $sformatf("t=%0d overflow", t));
      for (int i = 0; i < N; i++) chk(cv[i] == m_v[i] && (!m_v[i] || cs[i] == m_c[i].sid), $sformatf("t=%0d cell %0d", t, i));
      if (nvalid == N) n_full++;
      if (nvalid == N && write && fe >= 0) n_swap++;
      if (mode == IB_PAIR) n_pair++;
      @(posedge clk);
      m_ovf = write && fe < 0;
      if (read) begin
        m_v[f1] = 1'b0;
        if (mode == IB_PAIR) m_v[f2] = 1'b0;
      end
      if (write && fe >= 0) begin
        m_v[fe] = 1'b1;
        m_c[fe] = in_item;
      end
      @(negedge clk);
    end
    chk(n_full > 0 && n_pair > 0 && n_swap > 0, "full buffer, pair reads and write-while-read on a full buffer exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
