// waiting_buffer: the waiting queue (WQ) in front of the queueing buffer.
//
// When the queueing buffer memory cannot take a block because no block is
// free for the requesting channel, the controller moves up to one block of
// that channel's characters out of its line buffer into this queue, so that
// the line buffer gets room for new characters. As soon as a block can be
// given to that channel again, the queue is emptied into the QBM before any
// line buffer is served ("waiting buffer service"). The queue holds data of
// one channel at a time: tag is the channel of its contents, captured with
// every write. vacant is high when it holds nothing.
//
// The source design shows the waiting queue and when it is used; its depth
// (one block of data) and the one-channel restriction are this design's
// choices. Read port is show-ahead like the line buffers.
module waiting_buffer
  import smux_pkg::*;
#(
  parameter int unsigned N_CH  = N_CH_DEF,
  parameter int unsigned DEPTH = NBS_DEF - 2,
  localparam int unsigned CHW  = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           wr_en,
  input  lb_word_t       din,
  input  logic [CHW-1:0] wr_ch,
  input  logic           rd_en,
  output lb_word_t       dout,
  output logic [CHW-1:0] tag,
  output logic           vacant,
  output logic           full
);

  logic [LB_WORD_W-1:0] dout_bits;
  logic [$clog2(DEPTH+1)-1:0] count;

  sync_fifo #(.WIDTH(LB_WORD_W), .DEPTH(DEPTH)) u_fifo (
    .clk   (clk),
    .rst_n (rst_n),
    .wr_en (wr_en),
    .din   (din),
    .rd_en (rd_en),
    .dout  (dout_bits),
    .empty (vacant),
    .full  (full),
    .count (count)
  );

  assign dout = lb_word_t'(dout_bits);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tag <= '0;
    else if (wr_en) tag <= wr_ch;
  end

  // All contents belong to one channel.
  property p_one_channel;
    @(posedge clk) disable iff (!rst_n) (wr_en && !vacant) |-> (wr_ch == tag);
  endproperty
  a_one_channel: assert property (p_one_channel);

endmodule
