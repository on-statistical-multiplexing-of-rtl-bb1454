// line_buffer: per-user input buffer of the statistical multiplexer.
//
// Characters from one user terminal are written without any handshake
// (in_valid for one cycle per character): the terminal is never held off.
// A character that arrives while the buffer is full is lost and reported
// on drop for one cycle; this is where data is rejected when the buffer
// system cannot keep up.
//
// The buffer keeps its fill level (count) and the number of complete
// messages it holds (end-of-message marks not yet read). It asks for
// service (req) when its contents reach THRESHOLD characters, as the source
// design asks, or, this design's own addition, when it holds the end of a
// message, so that a message shorter than the threshold is not held back
// forever.
//
// The buffer control unit reads it through a show-ahead port: dout is the
// oldest character whenever empty is low, and rd_en takes it away at the
// clock edge. Depth and threshold are this design's choices; the default
// threshold is one block's worth of data.
module line_buffer
  import smux_pkg::*;
#(
  parameter int unsigned DEPTH     = LB_DEPTH_DEF,
  parameter int unsigned THRESHOLD = NBS_DEF - 2,
  localparam int unsigned CW       = $clog2(DEPTH + 1)
) (
  input  logic     clk,
  input  logic     rst_n,
  // user terminal side
  input  logic     in_valid,
  input  lb_word_t in_word,
  output logic     drop,
  // buffer control side
  input  logic     rd_en,
  output lb_word_t dout,
  output logic     empty,
  output logic     req,
  output logic [CW-1:0] count
);

  logic          full;
  logic [CW-1:0] n_eom;
  logic          wr_ok, rd_ok;
  logic [LB_WORD_W-1:0] dout_bits;

  sync_fifo #(.WIDTH(LB_WORD_W), .DEPTH(DEPTH)) u_fifo (
    .clk   (clk),
    .rst_n (rst_n),
    .wr_en (wr_ok),
    .din   (in_word),
    .rd_en (rd_ok),
    .dout  (dout_bits),
    .empty (empty),
    .full  (full),
    .count (count)
  );

  assign dout  = lb_word_t'(dout_bits);
  assign rd_ok = rd_en && !empty;
  assign wr_ok = in_valid && (!full || rd_ok);
  assign drop  = in_valid && !wr_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) n_eom <= '0;
    else n_eom <= n_eom + CW'(wr_ok && in_word.eom) - CW'(rd_ok && dout.eom);
  end

  assign req = (count >= CW'(THRESHOLD)) || (n_eom != '0);

  initial assert (THRESHOLD >= 1 && THRESHOLD <= DEPTH)
    else $error("line_buffer: THRESHOLD must lie in 1..DEPTH");

endmodule
