// smux_pkg: types and default sizes shared by the statistical multiplexer.
//
// The multiplexer moves characters from per-user line buffers into a
// block-organised queueing buffer memory (QBM) and sends them, block by
// block, on one output channel. This package holds the default sizes and
// the two word formats that cross module boundaries:
//   * lb_word_t  - one character plus an end-of-message mark, as held in a
//                  line buffer, the waiting buffer and a QBM data word;
//   * tx_word_t  - one word of the output frame (channel header, length
//                  header or data character).
// Defaults that follow the source design: four user channels (the four
// terminals of its system block diagram) and a 1000-word QBM cut into
// blocks that start every 100 words (block addresses 1, 101, ... 901 in
// its table example), i.e. 10 blocks of 100 words. The character width,
// line buffer depth and output rate are this design's own choices.
package smux_pkg;

  // Default number of user channels (destinations, "m").
  localparam int unsigned N_CH_DEF      = 4;
  // Default number of QBM blocks ("M").
  localparam int unsigned N_BLK_DEF     = 10;
  // Default block size in QBM words: NBS-2 data words, then the word with
  // the continuation bit, then the linkage pointer.
  localparam int unsigned NBS_DEF       = 100;
  // Line buffer depth in characters (own choice).
  localparam int unsigned LB_DEPTH_DEF  = 256;
  // Clock cycles per output word, the unit service interval (own choice).
  localparam int unsigned SERVICE_DEF   = 8;

  localparam int unsigned CHAR_W = 8;

  typedef logic [CHAR_W-1:0] char_t;

  typedef struct packed {
    logic  eom;   // last character of a message
    char_t ch;
  } lb_word_t;

  localparam int unsigned LB_WORD_W = $bits(lb_word_t);

  // Output frame of one block: K_CHAN (channel number), K_LEN (number of
  // data characters that follow), then that many K_DATA words.
  typedef enum logic [1:0] {
    K_CHAN = 2'd0,
    K_LEN  = 2'd1,
    K_DATA = 2'd2
  } tx_kind_e;

  typedef struct packed {
    tx_kind_e kind;
    lb_word_t w;     // for K_CHAN / K_LEN the value is in w.ch, eom = 0
  } tx_word_t;

  localparam int unsigned TX_WORD_W = $bits(tx_word_t);

  // One-cycle event pulses of the buffer control unit, brought out of the
  // multiplexer for statistics (overflow probability, block traffic).
  typedef struct packed {
    logic block_in;    // a block was stored in the QBM
    logic new_chain;   // ... as the first block of an idle channel
    logic append;      // ... linked behind the channel's last block
    logic overflow;    // service refused: no free block at all
    logic limit;       // service refused: channel has its full share
    logic wb_load;     // line buffer data moved to the waiting buffer
    logic wb_serve;    // waiting buffer emptied into a QBM block
    logic block_out;   // a block was sent and released
    logic chain_end;   // ... and it was the channel's last block
  } smux_ev_t;

  // Width of a QBM word: it must hold a data word (lb_word_t), the
  // continuation word {data count, C} and a linkage pointer (block number).
  function automatic int unsigned qbm_width(int unsigned n_blk, int unsigned nbs);
    int unsigned w;
    w = LB_WORD_W;
    if ($clog2(nbs - 1) + 1 > w) w = $clog2(nbs - 1) + 1;
    if ($clog2(n_blk) > w) w = $clog2(n_blk);
    return w;
  endfunction

endpackage
