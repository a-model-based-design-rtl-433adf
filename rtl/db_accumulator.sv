// Multi-set delayed-buffering (DB) floating-point accumulator.
//
// Sums a stream of single-precision vectors with one pipelined adder of
// latency P. One element may arrive every cycle (data_valid), the end of a
// vector is marked by data_last on its final element, and a new vector may
// follow immediately: vectors are never held back and several may be inside
// the accumulator at once. The sum of each vector appears on result with a
// one-cycle result_rdy pulse, with result_sid, the set identifier the vector
// was given (vectors are numbered 0, 1, 2, ... modulo 2**SID_W); results leave in the order the vectors finish
// reducing, which for vectors of similar length is their arrival order.
//
// Structure, as in the published design: the SID generator tags every element with
// its vector's set identifier; the A and B switches choose the adder's
// operands among the input element, the input buffer (IBUF), the result
// buffer (RBUF), the adder's own output and the constant 0; the SID
// supervisor follows the tags through the adder pipeline; the combinational
// main control logic decides every cycle which two operands of the same set
// are added and where the others wait (see main_control for the schedule,
// which is this design's own). RBUF defaults to the published ceil(2p/3)
// cells. IBUF defaults to ceil(p/2) + 2 = 8 cells, two more than the
// published size: with this schedule, long random streams of very short
// vectors were seen to need 7. overflow is a sticky flag set if a buffer
// write ever finds no free cell, which the sizes are meant to prevent.
//
// Timing: result_rdy and result depend combinationally on the registered
// adder output and on data_valid/data_last of the same cycle (the main
// control logic is combinational, as the published one is). The order in which
// a vector's elements are added differs from a sequential sum, so the result
// may differ from it by floating-point rounding.
module db_accumulator
  import db_pkg::*;
#(
  parameter int unsigned P      = 11,
  parameter int unsigned IBUF_N = (P + 1) / 2 + 2,
  parameter int unsigned RBUF_N = (2 * P + 2) / 3
) (
  input  logic  clk,
  input  logic  rst,
  input  fp32_t data,
  input  logic  data_valid,
  input  logic  data_last,
  output fp32_t result,
  output logic  result_rdy,
  output sid_t  result_sid,    // set identifier of the vector summed in result
  output logic  overflow,
  output op_t   op            // operation issued this cycle, for observation
);
  // SID generator
  item_t in_item;
  sid_t  open_sid;
  sid_generator u_sid_gen (
    .clk(clk), .rst(rst), .data(data),
    .data_valid_in(data_valid), .data_last_in(data_last),
    .in_item(in_item), .open_sid(open_sid)
  );

  // adder and SID supervisor
  fp32_t add_a, add_b, sum_data;
  logic  add_valid;
  sid_t  add_sid;
  logic  sum_valid, sum_internal_compare, sum_input_compare;
  sid_t  sum_sid;
  logic [NSID-1:0] pipe_has;

  adder_with_latency #(.P(P)) u_adder (
    .clk(clk), .rst(rst), .a(add_a), .b(add_b), .sum(sum_data)
  );

  sid_supervisor #(.P(P)) u_supervisor (
    .clk(clk), .rst(rst),
    .add_valid_in(add_valid), .sid_adder_in(add_sid),
    .input_valid(data_valid), .sid_input(in_item.sid),
    .sum_valid(sum_valid), .sid_sum(sum_sid),
    .sum_internal_compare(sum_internal_compare),
    .sum_input_compare(sum_input_compare),
    .pipe_has(pipe_has)
  );

  item_t sum_item;
  assign sum_item = '{data: sum_data, sid: sum_sid};

  // buffers
  logic     ib_write, ib_read, rb_write, rb_read;
  ib_mode_t ib_mode;
  sid_t     ib_key, rb_key;
  item_t    ib_a, ib_b, rb_a;
  logic     ib_sum_compare, ib_input_compare, ib_internal_compare, ib_full, ib_ovf;
  logic     rb_sum_compare, rb_full, rb_ovf;
  logic     ib_cell_valid [IBUF_N];
  sid_t     ib_cell_sid   [IBUF_N];
  logic     rb_cell_valid [RBUF_N];
  sid_t     rb_cell_sid   [RBUF_N];

  ibuf #(.N(IBUF_N)) u_ibuf (
    .clk(clk), .rst(rst),
    .write(ib_write), .input_in(in_item),
    .read(ib_read), .mode(ib_mode), .key(ib_key),
    .sid_input(in_item.sid), .sid_sum(sum_sid),
    .a_data(ib_a), .b_data(ib_b),
    .sum_compare(ib_sum_compare), .input_compare(ib_input_compare),
    .internal_compare(ib_internal_compare), .full(ib_full), .overflow(ib_ovf),
    .cell_valid(ib_cell_valid), .cell_sid(ib_cell_sid)
  );

  rbuf #(.N(RBUF_N)) u_rbuf (
    .clk(clk), .rst(rst),
    .write(rb_write), .sum_in(sum_item),
    .read(rb_read), .key(rb_key), .sid_sum(sum_sid),
    .a_data(rb_a), .sum_compare(rb_sum_compare), .full(rb_full), .overflow(rb_ovf),
    .cell_valid(rb_cell_valid), .cell_sid(rb_cell_sid)
  );

  // main control logic
  a_sel_t a_sel;
  b_sel_t b_sel;
  main_control #(.IBUF_N(IBUF_N), .RBUF_N(RBUF_N)) u_ctrl (
    .in_valid(data_valid), .in_last(data_last), .in_sid(open_sid),
    .sum_valid(sum_valid), .sum_sid(sum_sid),
    .sum_internal_compare(sum_internal_compare), .sum_input_compare(sum_input_compare),
    .pipe_has(pipe_has),
    .ib_sum_compare(ib_sum_compare), .ib_input_compare(ib_input_compare),
    .ib_cell_valid(ib_cell_valid), .ib_cell_sid(ib_cell_sid),
    .rb_sum_compare(rb_sum_compare),
    .rb_cell_valid(rb_cell_valid), .rb_cell_sid(rb_cell_sid),
    .op(op), .add_valid(add_valid), .add_sid(add_sid),
    .a_sel(a_sel), .b_sel(b_sel),
    .ib_write(ib_write), .ib_read(ib_read), .ib_mode(ib_mode), .ib_key(ib_key),
    .rb_write(rb_write), .rb_read(rb_read), .rb_key(rb_key),
    .result_rdy(result_rdy)
  );

  // A_Switch and B_Switch
  always_comb begin
    unique case (a_sel)
      A_IBUF:  add_a = ib_a.data;
      A_RBUF:  add_a = rb_a.data;
      default: add_a = in_item.data;
    endcase
    unique case (b_sel)
      B_IBUF:  add_b = ib_b.data;
      B_ZERO:  add_b = '0;
      B_IN:    add_b = in_item.data;
      default: add_b = sum_data;
    endcase
  end

  assign result     = sum_data;
  assign result_sid = sum_sid;

  always_ff @(posedge clk) begin
    if (rst)                      overflow <= 1'b0;
    else if (ib_ovf || rb_ovf)    overflow <= 1'b1;
  end

  // the buffer sizes are expected to be sufficient; flag any dropped operand
  a_no_overflow: assert property (@(posedge clk) disable iff (rst) !(ib_ovf || rb_ovf));
  c_ibuf_full:   cover property (@(posedge clk) disable iff (rst) ib_full);
  c_rbuf_full:   cover property (@(posedge clk) disable iff (rst) rb_full);

endmodule
