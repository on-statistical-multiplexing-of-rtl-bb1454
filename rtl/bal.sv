// bal: block available list of the queueing buffer memory.
//
// The source design's list has one entry per QBM block that holds the
// block's address while the block is free and 0 while it is in use; a free
// block is taken from any non-zero entry and a released block's address is
// written into any zero entry. This design keeps the same information as
// one free bit per block and takes the lowest-numbered free block.
//
// free_blk / any_free show the block that alloc would take (combinational);
// alloc marks it used at the clock edge. rel with rel_blk marks a block free
// again. An alloc and a rel in the same cycle are both performed. n_free is
// the number of free blocks. After reset every block is free.
module bal
  import smux_pkg::*;
#(
  parameter int unsigned N_BLK = N_BLK_DEF,
  localparam int unsigned BW   = (N_BLK > 1) ? $clog2(N_BLK) : 1,
  localparam int unsigned NW   = $clog2(N_BLK + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          alloc,
  output logic [BW-1:0] free_blk,
  output logic          any_free,
  input  logic          rel,
  input  logic [BW-1:0] rel_blk,
  output logic [NW-1:0] n_free
);

  logic [N_BLK-1:0] avail;

  always_comb begin
    any_free = 1'b0;
    free_blk = '0;
    for (int i = N_BLK - 1; i >= 0; i--)
      if (avail[i]) begin
        any_free = 1'b1;
        free_blk = BW'(i);
      end
  end

  always_comb begin
    n_free = '0;
    for (int i = 0; i < N_BLK; i++) n_free = n_free + NW'(avail[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) avail <= '1;
    else begin
      if (alloc && any_free) avail[free_blk] <= 1'b0;
      if (rel) avail[rel_blk] <= 1'b1;
    end
  end

  a_no_double_free: assert property (@(posedge clk) disable iff (!rst_n)
    rel |-> !avail[rel_blk]);
  a_alloc_when_free: assert property (@(posedge clk) disable iff (!rst_n)
    alloc |-> any_free);

endmodule
