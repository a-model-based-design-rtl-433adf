// Testbench of the delay line: random 8-bit words every cycle through a
// 5-cycle and a 0-cycle instance; outputs must equal the input 5 and 0
// cycles earlier. After reset the 5-cycle output must be 0 until the first
// word arrives.
module tb_delay_line;
  localparam int D = 5;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] din = 8'hA5, dout, dout0;
  logic [7:0] hist [$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  delay_line #(.W(8), .D(D)) dut  (.clk(clk), .rst(rst), .din(din), .dout(dout));
  delay_line #(.W(8), .D(0)) dut0 (.clk(clk), .rst(rst), .din(din), .dout(dout0));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 500; t++) begin
      din = 8'($urandom);
      hist.push_back(din);
      #1;
      checks++;
      if (dout0 != din) failures++;
      @(posedge clk);
      #1;
      checks++;
      if (hist.size() >= D) begin
        if (dout != hist[hist.size() - D]) begin
          failures++;
          $display("FAIL: t=%0d dout %h expected %h", t, dout, hist[hist.size() - D]);
        end
      end else if (dout != 8'h00) begin
        failures++;
        $display("FAIL: t=%0d dout %h expected 00 after reset", t, dout);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
