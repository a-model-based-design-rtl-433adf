// Testbench of the SID generator: random data_valid / data_last patterns;
// the tag must stay constant within a vector and advance by one (modulo
// 2**SID_W) only after an element with both data_valid and data_last high
// (data_last without data_valid must not count). The data field must pass
// through unchanged.
module tb_sid_generator;
  import db_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  fp32_t data = '0;
  logic dv = 1'b0, dl = 1'b0;
  item_t it;
  sid_t open_sid;
  int checks = 0, failures = 0;
  int model = 0;

  always #5 clk = ~clk;

  sid_generator dut (.clk(clk), .rst(rst), .data(data), .data_valid_in(dv), .data_last_in(dl),
                     .in_item(it), .open_sid(open_sid));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      data = $urandom;
      dv   = ($urandom_range(3) != 0);
      dl   = ($urandom_range(4) == 0);
      #1;
      checks++;
      if (it.sid != sid_t'(model) || open_sid != sid_t'(model) || it.data != data) begin
        failures++;
        if (failures < 10) $display("FAIL: t=%0d sid %0d expected %0d", t, it.sid, sid_t'(model));
      end
      @(posedge clk);
      if (dv && dl) model = model + 1;
      @(negedge clk);
    end
    checks++;
    if (model < 2 ** SID_W) failures++;  // the counter must have wrapped
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
