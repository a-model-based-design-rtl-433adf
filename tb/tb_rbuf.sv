// Testbench of the result buffer (8 cells): random writes and keyed reads
// with SIDs from a small range; a reference model of the cells (first empty or
// freed cell written, first matching cell read) predicts a_data, sum_compare, full,
// overflow and the exported tags every cycle. Writes into a full buffer are
// attempted on purpose, with and without a read in the same cycle (a write
// may take the cell being read).
module tb_rbuf;
  import db_pkg::*;
  localparam int N = 8;
  logic clk = 1'b0, rst = 1'b1;
  logic write = 1'b0, read = 1'b0;
  item_t in_item = '0;
  sid_t key = '0, sid_sum = '0;
  item_t a_data;
  logic sum_cmp, full, ovf;
  logic cv [N];
  sid_t cs [N];
  item_t m_c [N];
  logic  m_v [N];
  logic  m_ovf = 1'b0;
  int checks = 0, failures = 0, n_full = 0, n_swap = 0;

  always #5 clk = ~clk;

  rbuf #(.N(N)) dut (
    .clk(clk), .rst(rst), .write(write), .sum_in(in_item), .read(read), .key(key),
    .sid_sum(sid_sum), .a_data(a_data), .sum_compare(sum_cmp), .full(full), .overflow(ovf),
    .cell_valid(cv), .cell_sid(cs)
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
      int f1, fe, nvalid;
      logic e_sum;
      write   = ($urandom_range(99) < ((t / 500) % 2 == 0 ? 70 : 40));
      in_item = '{data: $urandom, sid: sid_t'($urandom_range(4))};
      sid_sum = sid_t'($urandom_range(4));
      key     = sid_t'($urandom_range(4));
      f1 = -1; fe = -1;
      nvalid = 0;
      for (int i = 0; i < N; i++) begin
        if (m_v[i] && m_c[i].sid == key && f1 < 0) f1 = i;
        if (m_v[i]) nvalid++;
      end
      read = (f1 >= 0) && ($urandom_range(1) == 1);
      // a write may take a cell that is empty or is read in this cycle
      for (int i = 0; i < N; i++)
        if (fe < 0 && (!m_v[i] || (read && i == f1))) fe = i;
      #1;
      e_sum = 1'b0;
      foreach (m_v[i]) if (m_v[i] && m_c[i].sid == sid_sum) e_sum = 1'b1;
      chk(full == (nvalid == N), $sformatf("t=%0d full", t));
      chk(sum_cmp == e_sum, $sformatf("t=%0d sum_compare", t));
      if (f1 >= 0) chk(a_data == m_c[f1], $sformatf("t=%0d a_data %h expected %h", t, a_data, m_c[f1]));
      chk(ovf == m_ovf, $sformatf("t=%0d overflow", t));
      for (int i = 0; i < N; i++) chk(cv[i] == m_v[i] && (!m_v[i] || cs[i] == m_c[i].sid), $sformatf("t=%0d cell %0d", t, i));
      if (nvalid == N) n_full++;
      if (nvalid == N && write && fe >= 0) n_swap++;
      @(posedge clk);
      m_ovf = write && fe < 0;
      if (read) m_v[f1] = 1'b0;
      if (write && fe >= 0) begin
        m_v[fe] = 1'b1;
        m_c[fe] = in_item;
      end
      @(negedge clk);
    end
    chk(n_full > 0 && n_swap > 0, "full buffer and write-while-read on a full buffer exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
