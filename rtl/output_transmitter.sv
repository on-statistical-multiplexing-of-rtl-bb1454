// output_transmitter: output channel interface at a fixed rate.
//
// The source design transmits the queued data on the output channel at a
// fixed rate, one character per unit service interval. The output process
// of the buffer control unit writes framed words (tx_word_t) into this
// transmit queue in bursts; the transmitter takes one word out every
// SERVICE clock cycles while the queue holds any and presents it on
// out_word with out_valid high for one cycle. The channel has no
// back-pressure. space tells the controller how many words still fit, so
// that it starts a block only when the whole frame fits. Queue depth and
// SERVICE are this design's choices.
module output_transmitter
  import smux_pkg::*;
#(
  parameter int unsigned DEPTH   = 2 * NBS_DEF,
  parameter int unsigned SERVICE = SERVICE_DEF,
  localparam int unsigned CW     = $clog2(DEPTH + 1),
  localparam int unsigned TW     = (SERVICE > 1) ? $clog2(SERVICE) : 1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     push,
  input  tx_word_t din,
  output logic [CW-1:0] space,
  output logic     out_valid,
  output tx_word_t out_word
);

  logic [TX_WORD_W-1:0] dout_bits;
  logic          empty, full, send;
  logic [CW-1:0] count;
  logic [TW-1:0] timer;    // cycles left until the next slot

  sync_fifo #(.WIDTH(TX_WORD_W), .DEPTH(DEPTH)) u_q (
    .clk   (clk),
    .rst_n (rst_n),
    .wr_en (push),
    .din   (din),
    .rd_en (send),
    .dout  (dout_bits),
    .empty (empty),
    .full  (full),
    .count (count)
  );

  assign send  = (timer == '0) && !empty;
  assign space = CW'(DEPTH) - count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer     <= '0;
      out_valid <= 1'b0;
      out_word  <= '0;
    end else begin
      out_valid <= send;
      if (send) begin
        out_word <= tx_word_t'(dout_bits);
        timer    <= TW'(SERVICE - 1);
      end else if (timer != '0) begin
        timer <= timer - 1'b1;
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    push |-> !full);

endmodule
