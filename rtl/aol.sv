// aol: arrival order list of the queueing buffer.
//
// Each time a block is stored in the queueing buffer memory, the channel
// (destination) it belongs to is appended here. The output process serves
// blocks in the order of this list, which makes the service first-in
// first-out across channels; within a channel the blocks are chained in the
// QBM, so the list needs only the channel number. With one entry per stored
// block the list never needs more entries than there are QBM blocks.
//
// push/push_ch append at the clock edge; head is the oldest entry whenever
// empty is low and pop removes it. Reset empties the list.
module aol
  import smux_pkg::*;
#(
  parameter int unsigned N_CH  = N_CH_DEF,
  parameter int unsigned N_BLK = N_BLK_DEF,
  localparam int unsigned CHW  = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           push,
  input  logic [CHW-1:0] push_ch,
  input  logic           pop,
  output logic [CHW-1:0] head,
  output logic           empty
);

  logic full;
  logic [$clog2(N_BLK+1)-1:0] count;

  sync_fifo #(.WIDTH(CHW), .DEPTH(N_BLK)) u_list (
    .clk   (clk),
    .rst_n (rst_n),
    .wr_en (push),
    .din   (push_ch),
    .rd_en (pop),
    .dout  (head),
    .empty (empty),
    .full  (full),
    .count (count)
  );

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    pop |-> !empty);

endmodule
