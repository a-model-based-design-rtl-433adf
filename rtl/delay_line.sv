// Delay line: presents its input D clock cycles later (the z^-k blocks of
// the kernel). A shift register of D stages of W bits; D = 0 is a plain wire.
// The kernel uses it to keep data_valid, data_last and result_ready aligned
// with the latency of the multiplier (q), the adder (p) and the cubic power
// (2q). Reset clears every stage, so a delayed strobe never fires spuriously
// after reset (the reset behaviour is this design's choice).
module delay_line #(
  parameter int unsigned W = 1,
  parameter int unsigned D = 6
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  if (D == 0) begin : g_wire
    assign dout = din;
  end else begin : g_shift
    logic [W-1:0] stage [D];
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int i = 0; i < int'(D); i++) stage[i] <= '0;
      end else begin
        stage[0] <= din;
        for (int i = 1; i < int'(D); i++) stage[i] <= stage[i-1];
      end
    end
    assign dout = stage[D-1];
  end
endmodule
