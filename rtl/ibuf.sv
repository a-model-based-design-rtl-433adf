// Input buffer (IBUF): holds input elements that cannot enter the adder at
// once because no operand of the same set is available to pair them with.
// As in the published design it has three parts: an array of N memory cells that
// store {value, SID} with a valid bit, a write controller that puts a new
// element into the first free cell, and a read controller. The published
// size is N = ceil(p/2) = 6 for p = 11; the accumulator uses 8 cells (see
// db_accumulator).
//
// Read modes (read = 1, applied at the clock edge, data valid in the same
// cycle):
//   IB_A    (1) the first cell whose SID equals key is presented on a_data;
//   IB_PAIR (2) the first two cells whose SID equals key go to a_data, b_data;
//   IB_B    (3) the first cell whose SID equals key is presented on b_data.
// Cells read are freed at the next clock edge. In the published design the read
// controller itself picks the pair of the oldest set; here the main control
// logic chooses the set and passes its SID as key (this design's choice).
// A write and a read may happen in the same cycle; the write goes to the
// first cell that is empty or is being read in that cycle, so a buffer
// holding N operands can take a new one while giving one up. A write that
// finds no such cell is dropped and raises overflow for one cycle; full
// means that all N cells are occupied.
// Compare outputs (combinational): sum_compare / input_compare: some cell
// holds the SID of the adder output / of the input element; internal_compare:
// two cells hold the same SID. cell_valid and cell_sid expose the tags to the
// main control logic.
module ibuf
  import db_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   write,
  input  item_t  input_in,
  input  logic   read,
  input  ib_mode_t mode,
  input  sid_t   key,
  input  sid_t   sid_input,
  input  sid_t   sid_sum,
  output item_t  a_data,
  output item_t  b_data,
  output logic   sum_compare,
  output logic   input_compare,
  output logic   internal_compare,
  output logic   full,
  output logic   overflow,
  output logic   cell_valid [N],
  output sid_t   cell_sid   [N]
);
  item_t mem  [N];
  logic  vld  [N];

  // read controller: first (and second) cell holding the key SID
  logic [N-1:0] rd_first, rd_second;
  always_comb begin
    logic found1, found2;
    rd_first  = '0;
    rd_second = '0;
    found1    = 1'b0;
    found2    = 1'b0;
    for (int i = 0; i < int'(N); i++) begin
      if (vld[i] && mem[i].sid == key) begin
        if (!found1) begin
          rd_first[i] = 1'b1;
          found1      = 1'b1;
        end else if (!found2) begin
          rd_second[i] = 1'b1;
          found2       = 1'b1;
        end
      end
    end
  end

  item_t first_item, second_item;
  always_comb begin
    first_item  = '0;
    second_item = '0;
    for (int i = 0; i < int'(N); i++) begin
      if (rd_first[i])  first_item  = mem[i];
      if (rd_second[i]) second_item = mem[i];
    end
  end

  always_comb begin
    a_data = '0;
    b_data = '0;
    unique case (mode)
      IB_A:    a_data = first_item;
      IB_PAIR: begin a_data = first_item; b_data = second_item; end
      IB_B:    b_data = first_item;
      default: ;
    endcase
  end

  logic [N-1:0] rd_clear;
  always_comb begin
    rd_clear = '0;
    if (read) begin
      rd_clear = rd_first;
      if (mode == IB_PAIR) rd_clear = rd_first | rd_second;
    end
  end

  // write controller: first cell that is empty or is being read this cycle
  logic [N-1:0] wr_onehot;
  logic         no_free;
  always_comb begin
    wr_onehot = '0;
    no_free   = 1'b1;
    full      = 1'b1;
    for (int i = 0; i < int'(N); i++) begin
      if (!vld[i]) full = 1'b0;
      if ((!vld[i] || rd_clear[i]) && no_free) begin
        wr_onehot[i] = 1'b1;
        no_free      = 1'b0;
      end
    end
  end

  // memory cells
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(N); i++) begin
        vld[i]  <= 1'b0;
        mem[i] <= '0;
      end
      overflow <= 1'b0;
    end else begin
      for (int i = 0; i < int'(N); i++) begin
        if (write && wr_onehot[i]) begin
          vld[i] <= 1'b1;
          mem[i] <= input_in;
        end else if (rd_clear[i]) begin
          vld[i] <= 1'b0;
        end
      end
      overflow <= write && no_free;
    end
  end

  // compare flags
  always_comb begin
    sum_compare      = 1'b0;
    input_compare    = 1'b0;
    internal_compare = 1'b0;
    for (int i = 0; i < int'(N); i++) begin
      if (vld[i] && mem[i].sid == sid_sum)   sum_compare   = 1'b1;
      if (vld[i] && mem[i].sid == sid_input) input_compare = 1'b1;
      for (int j = i + 1; j < int'(N); j++) begin
        if (vld[i] && vld[j] && mem[i].sid == mem[j].sid) internal_compare = 1'b1;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < int'(N); i++) begin
      cell_valid[i] = vld[i];
      cell_sid[i]   = mem[i].sid;
    end
  end

  // a read must find what it asks for
  property p_read_hits;
    @(posedge clk) disable iff (rst) read |-> (|rd_first) && (mode != IB_PAIR || (|rd_second));
  endproperty
  a_read_hits: assert property (p_read_hits);
endmodule
