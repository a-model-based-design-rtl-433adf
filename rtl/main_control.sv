// Main control logic of the multi-set delayed-buffering accumulator. Purely
// combinational, as in the published design: from the event flags of the cycle it
// sets the IBUF and RBUF read/write controls, the IBUF read mode, the A and B
// switch selects, the SID of the addition issued, and result_rdy.
//
// The published description of this block does not give its algorithm in
// detail, so the scheduling below is this design's own. It keeps the two
// properties the published design relies on: one element accepted every
// cycle with no back-pressure, and any number of vectors in flight, each
// tagged by its SID. Each cycle the adder gets at most one pair; the candidates are
// tried in this order:
//   1. adder output + input element of the same set        (OP_IN_SUM)
//   2. adder output + a buffered sum, else a buffered input (OP_SUM_RBUF,
//      OP_SUM_IBUF)
//   3. input element + a buffered input of its set          (OP_IN_IBUF)
//   4. input element that is the last of its set and has no other operand
//      anywhere, added to 0                                 (OP_IN_ZERO)
//   5. otherwise the adder slot is free and goes to the buffered operand of
//      the oldest set (largest SID distance from the open set) that can make
//      progress: a pair of buffered inputs (OP_IB_PAIR), a buffered sum with
//      a buffered input (OP_RB_IB), or a lone buffered input of a finished
//      set with nothing of its set left in the pipeline, added to 0
//      (OP_IB_ZERO).
// An input element not used goes to IBUF; an adder output not used goes to
// RBUF, unless it is the finished sum of its set: its set is closed (SID
// differs from the open one), nothing of the set is in the pipeline, in a
// buffer or at the input. It is then presented as the result (result_rdy).
// Sums are always matched against RBUF first, so RBUF never holds two sums of
// one set and never needs a pair read. A sum is only stored while its set is
// still open or has more operands in the pipeline, so a stored sum always
// gets a partner later and never needs to be added to 0.
module main_control
  import db_pkg::*;
#(
  parameter int unsigned IBUF_N = 8,
  parameter int unsigned RBUF_N = 8
) (
  // input element (tag from the SID generator; its SID is the open set)
  input  logic            in_valid,
  input  logic            in_last,
  input  sid_t            in_sid,
  // SID supervisor
  input  logic            sum_valid,
  input  sid_t            sum_sid,
  input  logic            sum_internal_compare,
  input  logic            sum_input_compare,
  input  logic [NSID-1:0] pipe_has,
  // IBUF
  input  logic            ib_sum_compare,
  input  logic            ib_input_compare,
  input  logic            ib_cell_valid [IBUF_N],
  input  sid_t            ib_cell_sid   [IBUF_N],
  // RBUF
  input  logic            rb_sum_compare,
  input  logic            rb_cell_valid [RBUF_N],
  input  sid_t            rb_cell_sid   [RBUF_N],
  // controls
  output op_t             op,
  output logic            add_valid,
  output sid_t            add_sid,
  output a_sel_t          a_sel,
  output b_sel_t          b_sel,
  output logic            ib_write,
  output logic            ib_read,
  output ib_mode_t        ib_mode,
  output sid_t            ib_key,
  output logic            rb_write,
  output logic            rb_read,
  output sid_t            rb_key,
  output logic            result_rdy
);
  // presence of a SID in RBUF / IBUF
  function automatic logic in_rbuf(input sid_t s, input logic vv [RBUF_N], input sid_t ss [RBUF_N]);
    logic r = 1'b0;
    for (int i = 0; i < int'(RBUF_N); i++) if (vv[i] && ss[i] == s) r = 1'b1;
    return r;
  endfunction

  // free-slot choice: the oldest set among buffered operands that can progress
  op_t  free_op;
  sid_t free_sid;
  always_comb begin
    sid_t best_age, age;
    logic have;
    logic ib_partner, rb_partner, lone;
    free_op  = OP_NONE;
    free_sid = '0;
    best_age = '0;
    have     = 1'b0;
    for (int i = 0; i < int'(IBUF_N); i++) begin
      ib_partner = 1'b0;
      for (int j = 0; j < int'(IBUF_N); j++)
        if (j != i && ib_cell_valid[j] && ib_cell_sid[j] == ib_cell_sid[i]) ib_partner = 1'b1;
      rb_partner = in_rbuf(ib_cell_sid[i], rb_cell_valid, rb_cell_sid);
      lone = (ib_cell_sid[i] != in_sid) && !pipe_has[ib_cell_sid[i]]
             && !(sum_valid && sum_sid == ib_cell_sid[i]);
      age  = in_sid - ib_cell_sid[i];
      if (ib_cell_valid[i] && (ib_partner || rb_partner || lone) && (!have || age > best_age)) begin
        have     = 1'b1;
        best_age = age;
        free_sid = ib_cell_sid[i];
        free_op  = ib_partner ? OP_IB_PAIR : (rb_partner ? OP_RB_IB : OP_IB_ZERO);
      end
    end
  end

  logic in_lone, sum_final;
  assign in_lone = in_valid && in_last && !ib_input_compare
                   && !in_rbuf(in_sid, rb_cell_valid, rb_cell_sid)
                   && !pipe_has[in_sid] && !(sum_valid && sum_sid == in_sid);
  assign sum_final = sum_valid && (sum_sid != in_sid) && !sum_internal_compare
                     && !ib_sum_compare && !rb_sum_compare;

  always_comb begin
    if (sum_input_compare)                    op = OP_IN_SUM;
    else if (sum_valid && rb_sum_compare)     op = OP_SUM_RBUF;
    else if (sum_valid && ib_sum_compare)     op = OP_SUM_IBUF;
    else if (in_valid && ib_input_compare)    op = OP_IN_IBUF;
    else if (in_lone)                         op = OP_IN_ZERO;
    else                                      op = free_op;
  end

  always_comb begin
    add_valid = 1'b1;
    add_sid   = in_sid;
    a_sel     = A_IN;
    b_sel     = B_SUM;
    ib_read   = 1'b0;
    ib_mode   = IB_NONE;
    ib_key    = in_sid;
    rb_read   = 1'b0;
    rb_key    = sum_sid;
    unique case (op)
      OP_IN_SUM:   begin a_sel = A_IN;   b_sel = B_SUM; end
      OP_SUM_RBUF: begin a_sel = A_RBUF; b_sel = B_SUM; add_sid = sum_sid; rb_read = 1'b1; end
      OP_SUM_IBUF: begin a_sel = A_IBUF; b_sel = B_SUM; add_sid = sum_sid;
                         ib_read = 1'b1; ib_mode = IB_A; ib_key = sum_sid; end
      OP_IN_IBUF:  begin a_sel = A_IN;   b_sel = B_IBUF; ib_read = 1'b1; ib_mode = IB_B; end
      OP_IN_ZERO:  begin a_sel = A_IN;   b_sel = B_ZERO; end
      OP_IB_PAIR:  begin a_sel = A_IBUF; b_sel = B_IBUF; add_sid = free_sid;
                         ib_read = 1'b1; ib_mode = IB_PAIR; ib_key = free_sid; end
      OP_RB_IB:    begin a_sel = A_RBUF; b_sel = B_IBUF; add_sid = free_sid;
                         rb_read = 1'b1; rb_key = free_sid;
                         ib_read = 1'b1; ib_mode = IB_B; ib_key = free_sid; end
      OP_IB_ZERO:  begin a_sel = A_IBUF; b_sel = B_ZERO; add_sid = free_sid;
                         ib_read = 1'b1; ib_mode = IB_A; ib_key = free_sid; end
      default:     add_valid = 1'b0;
    endcase
  end

  // where the input element and the adder output go when they are not used
  logic in_used, sum_used;
  assign in_used  = (op == OP_IN_SUM) || (op == OP_IN_IBUF) || (op == OP_IN_ZERO);
  assign sum_used = (op == OP_IN_SUM) || (op == OP_SUM_RBUF) || (op == OP_SUM_IBUF);

  assign ib_write   = in_valid && !in_used;
  assign result_rdy = sum_valid && !sum_used && sum_final;
  assign rb_write   = sum_valid && !sum_used && !sum_final;
endmodule
