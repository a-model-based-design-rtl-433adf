// SID supervisor logic: follows the set identifiers of the operations inside
// the adder pipeline. It keeps a P-stage shift register of {valid, SID} that
// runs beside the adder's data delay, so the SID leaving it belongs to the sum
// leaving the adder in the same cycle. Outputs, all combinational from the
// registered stages and the current input tag:
//   sum_valid             a new adder output is present (sid_sum is its SID);
//   sum_internal_compare  another operation of the same set is still inside
//                         the pipeline;
//   sum_input_compare     the adder output and the valid input element belong
//                         to the same set;
//   pipe_has[k]           some operation of set k is inside the pipeline,
//                         the output stage excluded (used by the control to
//                         decide whether a buffered operand can still expect a
//                         partner from the adder).
// The three named flags are the published ones; the pipe_has vector and keeping
// the SIDs here rather than inside the adder are this design's choices.
module sid_supervisor
  import db_pkg::*;
#(
  parameter int unsigned P = 11
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            add_valid_in,   // an addition is issued this cycle
  input  sid_t            sid_adder_in,   // its SID
  input  logic            input_valid,
  input  sid_t            sid_input,
  output logic            sum_valid,
  output sid_t            sid_sum,
  output logic            sum_internal_compare,
  output logic            sum_input_compare,
  output logic [NSID-1:0] pipe_has
);
  logic vld [P];
  sid_t sid [P];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(P); i++) begin
        vld[i] <= 1'b0;
        sid[i] <= '0;
      end
    end else begin
      vld[0] <= add_valid_in;
      sid[0] <= sid_adder_in;
      for (int i = 1; i < int'(P); i++) begin
        vld[i] <= vld[i-1];
        sid[i] <= sid[i-1];
      end
    end
  end

  assign sum_valid = vld[P-1];
  assign sid_sum   = sid[P-1];

  always_comb begin
    pipe_has = '0;
    for (int i = 0; i < int'(P) - 1; i++) begin
      if (vld[i]) pipe_has[sid[i]] = 1'b1;
    end
  end

  assign sum_internal_compare = sum_valid && pipe_has[sid_sum];
  assign sum_input_compare    = sum_valid && input_valid && (sid_input == sid_sum);
endmodule
