// Result buffer (RBUF): holds adder outputs that cannot be fed back yet
// because no operand of the same set is there to pair them with. It is the
// input buffer reduced, as in the published design: N cells of {value, SID} with a
// valid bit, a write port that fills the first free cell, and a single read
// port that presents the first cell whose SID equals key on a_data (freed at
// the next clock edge). N = ceil(2p/3) = 8 for p = 11, the published size.
// sum_compare is high when a cell holds the SID of the current adder output.
// Choosing the cell by a key SID supplied by the main control logic, and
// exposing cell_valid / cell_sid to it, are this design's choices. A write
// may take the cell read in the same cycle; a write that finds no empty or
// freed cell is dropped and raises overflow for one cycle. full means that
// all N cells are occupied.
module rbuf
  import db_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  write,
  input  item_t sum_in,
  input  logic  read,
  input  sid_t  key,
  input  sid_t  sid_sum,
  output item_t a_data,
  output logic  sum_compare,
  output logic  full,
  output logic  overflow,
  output logic  cell_valid [N],
  output sid_t  cell_sid   [N]
);
  item_t mem  [N];
  logic  vld  [N];

  logic [N-1:0] rd_onehot;
  always_comb begin
    logic found;
    rd_onehot = '0;
    found     = 1'b0;
    a_data    = '0;
    for (int i = 0; i < int'(N); i++) begin
      if (vld[i] && mem[i].sid == key && !found) begin
        rd_onehot[i] = 1'b1;
        found        = 1'b1;
        a_data       = mem[i];
      end
    end
  end

  // write: first cell that is empty or is being read this cycle
  logic [N-1:0] wr_onehot;
  logic         no_free;
  always_comb begin
    wr_onehot = '0;
    no_free   = 1'b1;
    full      = 1'b1;
    for (int i = 0; i < int'(N); i++) begin
      if (!vld[i]) full = 1'b0;
      if ((!vld[i] || (read && rd_onehot[i])) && no_free) begin
        wr_onehot[i] = 1'b1;
        no_free      = 1'b0;
      end
    end
  end

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
          mem[i] <= sum_in;
        end else if (read && rd_onehot[i]) begin
          vld[i] <= 1'b0;
        end
      end
      overflow <= write && no_free;
    end
  end

  always_comb begin
    sum_compare = 1'b0;
    for (int i = 0; i < int'(N); i++) begin
      if (vld[i] && mem[i].sid == sid_sum) sum_compare = 1'b1;
      cell_valid[i] = vld[i];
      cell_sid[i]   = mem[i].sid;
    end
  end

  property p_read_hits;
    @(posedge clk) disable iff (rst) read |-> (|rd_onehot);
  endproperty
  a_read_hits: assert property (p_read_hits);
endmodule
