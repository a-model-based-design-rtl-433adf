// SID generator: tags each input element with the set identifier (SID) of
// the vector it belongs to. The SID is a counter that advances by one after
// every element that arrives with both data_valid and data_last high, so all
// elements of one vector carry the same SID (the published rule).
// The tag is combinational: in_item = {data, sid} is valid in the same cycle
// as data. open_sid is the SID of the vector currently being received; any
// SID different from it belongs to a vector whose last element has already
// arrived. The counter wraps at 2**SID_W; it resets to 0 (reset value assumed).
module sid_generator
  import db_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  fp32_t data,
  input  logic  data_valid_in,
  input  logic  data_last_in,
  output item_t in_item,
  output sid_t  open_sid
);
  sid_t cnt;

  always_ff @(posedge clk) begin
    if (rst)                                cnt <= '0;
    else if (data_valid_in && data_last_in) cnt <= cnt + sid_t'(1);
  end

  assign open_sid     = cnt;
  assign in_item.data = data;
  assign in_item.sid  = cnt;
endmodule
