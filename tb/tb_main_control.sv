// Testbench of the main control logic (combinational, buffers of 6 and 8
// cells). Directed situations, each with the decision worked out by hand
// from the scheduling rules: which operation is issued, which switch inputs
// are selected, which buffer is read with which key, where the unused input
// element and adder output go, and when a finished sum is flagged. The open
// set is SID 10 throughout; lower SIDs are older, finished sets.
module tb_main_control;
  import db_pkg::*;
  localparam int IN = 6, RN = 8;

  logic in_valid, in_last, sum_valid, sum_int, sum_inp, ib_sum, ib_in, rb_sum;
  sid_t in_sid, sum_sid;
  logic [NSID-1:0] pipe_has;
  logic ib_v [IN]; sid_t ib_s [IN];
  logic rb_v [RN]; sid_t rb_s [RN];
  op_t op; logic add_valid; sid_t add_sid; a_sel_t a_sel; b_sel_t b_sel;
  logic ib_write, ib_read, rb_write, rb_read, result_rdy;
  ib_mode_t ib_mode; sid_t ib_key, rb_key;
  int checks = 0, failures = 0;

  main_control #(.IBUF_N(IN), .RBUF_N(RN)) dut (
    .in_valid(in_valid), .in_last(in_last), .in_sid(in_sid),
    .sum_valid(sum_valid), .sum_sid(sum_sid), .sum_internal_compare(sum_int),
    .sum_input_compare(sum_inp), .pipe_has(pipe_has),
    .ib_sum_compare(ib_sum), .ib_input_compare(ib_in), .ib_cell_valid(ib_v), .ib_cell_sid(ib_s),
    .rb_sum_compare(rb_sum), .rb_cell_valid(rb_v), .rb_cell_sid(rb_s),
    .op(op), .add_valid(add_valid), .add_sid(add_sid), .a_sel(a_sel), .b_sel(b_sel),
    .ib_write(ib_write), .ib_read(ib_read), .ib_mode(ib_mode), .ib_key(ib_key),
    .rb_write(rb_write), .rb_read(rb_read), .rb_key(rb_key), .result_rdy(result_rdy)
  );

  // flags the buffers and supervisor would derive from the cell contents
  task automatic derive();
    ib_sum = 1'b0; ib_in = 1'b0; rb_sum = 1'b0;
    foreach (ib_v[i]) if (ib_v[i]) begin
      if (ib_s[i] == sum_sid) ib_sum = 1'b1;
      if (ib_s[i] == in_sid) ib_in = 1'b1;
    end
    foreach (rb_v[i]) if (rb_v[i] && rb_s[i] == sum_sid) rb_sum = 1'b1;
    sum_int = sum_valid && pipe_has[sum_sid];
    sum_inp = sum_valid && in_valid && in_sid == sum_sid;
    #1;
  endtask

  task automatic clear();
    in_valid = 0; in_last = 0; in_sid = 10; sum_valid = 0; sum_sid = 0; pipe_has = '0;
    foreach (ib_v[i]) begin ib_v[i] = 0; ib_s[i] = 0; end
    foreach (rb_v[i]) begin rb_v[i] = 0; rb_s[i] = 0; end
  endtask

  task automatic expect_op(input string name, input op_t e_op, input a_sel_t ea, input b_sel_t eb,
                           input sid_t e_sid, input logic e_ibw, input logic e_rbw, input logic e_rdy);
    derive();
    checks++;
    if (op != e_op || add_valid != (e_op != OP_NONE) ||
        (e_op != OP_NONE && (a_sel != ea || b_sel != eb || add_sid != e_sid)) ||
        ib_write != e_ibw || rb_write != e_rbw || result_rdy != e_rdy) begin
      failures++;
      $display("FAIL %s: op %s a %s b %s sid %0d ibw %b rbw %b rdy %b", name, op.name(), a_sel.name(),
               b_sel.name(), add_sid, ib_write, rb_write, result_rdy);
    end
  endtask

  initial begin
    clear();
    expect_op("idle", OP_NONE, A_IN, B_SUM, 0, 0, 0, 0);

    clear(); in_valid = 1; in_sid = 10;
    expect_op("first element is buffered", OP_NONE, A_IN, B_SUM, 0, 1, 0, 0);

    clear(); in_valid = 1; sum_valid = 1; sum_sid = 10; pipe_has[10] = 1;
    expect_op("input meets its set at the adder output", OP_IN_SUM, A_IN, B_SUM, 10, 0, 0, 0);

    clear(); in_valid = 1; sum_valid = 1; sum_sid = 7; rb_v[3] = 1; rb_s[3] = 7; ib_v[0] = 1; ib_s[0] = 7;
    expect_op("sum pairs with RBUF first", OP_SUM_RBUF, A_RBUF, B_SUM, 7, 1, 0, 0);
    checks++; if (!(rb_read && rb_key == 7 && !ib_read)) failures++;

    clear(); sum_valid = 1; sum_sid = 7; ib_v[2] = 1; ib_s[2] = 7;
    expect_op("sum pairs with IBUF", OP_SUM_IBUF, A_IBUF, B_SUM, 7, 0, 0, 0);
    checks++; if (!(ib_read && ib_mode == IB_A && ib_key == 7)) failures++;

    clear(); in_valid = 1; ib_v[4] = 1; ib_s[4] = 10; sum_valid = 1; sum_sid = 8; pipe_has[8] = 1;
    expect_op("input pairs with IBUF, sum stored", OP_IN_IBUF, A_IN, B_IBUF, 10, 0, 1, 0);
    checks++; if (!(ib_read && ib_mode == IB_B && ib_key == 10)) failures++;

    clear(); in_valid = 1; in_last = 1;
    expect_op("one-element vector added to zero", OP_IN_ZERO, A_IN, B_ZERO, 10, 0, 0, 0);

    clear(); in_valid = 1; in_last = 1; pipe_has[10] = 1;
    expect_op("last element waits for its set in the pipeline", OP_NONE, A_IN, B_SUM, 0, 1, 0, 0);

    clear(); sum_valid = 1; sum_sid = 6;
    expect_op("finished sum is the result", OP_NONE, A_IN, B_SUM, 0, 0, 0, 1);

    clear(); sum_valid = 1; sum_sid = 6; pipe_has[6] = 1;
    expect_op("sum with its set still in the pipeline is stored", OP_NONE, A_IN, B_SUM, 0, 0, 1, 0);

    clear(); sum_valid = 1; sum_sid = 10;
    expect_op("sum of the open set is stored", OP_NONE, A_IN, B_SUM, 0, 0, 1, 0);

    clear(); ib_v[1] = 1; ib_s[1] = 9; ib_v[5] = 1; ib_s[5] = 9; ib_v[2] = 1; ib_s[2] = 4; ib_v[3] = 1; ib_s[3] = 4;
    expect_op("free slot: oldest pair first", OP_IB_PAIR, A_IBUF, B_IBUF, 4, 0, 0, 0);
    checks++; if (!(ib_mode == IB_PAIR && ib_key == 4)) failures++;

    clear(); ib_v[0] = 1; ib_s[0] = 9; rb_v[6] = 1; rb_s[6] = 9;
    expect_op("free slot: buffered sum with buffered input", OP_RB_IB, A_RBUF, B_IBUF, 9, 0, 0, 0);
    checks++; if (!(rb_read && rb_key == 9 && ib_mode == IB_B && ib_key == 9)) failures++;

    clear(); ib_v[0] = 1; ib_s[0] = 9;
    expect_op("free slot: lone input of a finished set", OP_IB_ZERO, A_IBUF, B_ZERO, 9, 0, 0, 0);

    clear(); ib_v[0] = 1; ib_s[0] = 9; pipe_has[9] = 1;
    expect_op("buffered input waits for its set in the pipeline", OP_NONE, A_IN, B_SUM, 0, 0, 0, 0);

    clear(); ib_v[0] = 1; ib_s[0] = 10;
    expect_op("buffered input of the open set waits", OP_NONE, A_IN, B_SUM, 0, 0, 0, 0);

    // wrap-around: open set 1, set 30 is older than set 0
    clear(); in_sid = 1; ib_v[0] = 1; ib_s[0] = 0; ib_v[1] = 1; ib_s[1] = 30;
    expect_op("age across SID wrap-around", OP_IB_ZERO, A_IBUF, B_ZERO, 30, 0, 0, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
