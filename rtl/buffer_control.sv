// buffer_control: buffer control unit of the statistical multiplexer.
//
// This is the sequencer that the source design describes as a
// micro-programmed controller made of a network controller (transmission
// control), a message queueing controller (queueing and scheduling) and a
// message editor (headers and block linkage). Here the three are one state
// machine that runs two processes, one at a time, taking turns when both
// have work. A waiting buffer whose channel may not take a block yet does
// not count as input work, so that the output process, which is the only
// one that frees blocks, always gets to run:
//
// Input process (queueing buffer service). The channel scanner offers a
// line buffer that asks for service. The controller first checks that a
// QBM block may be given to that channel (see the partitioning rule below)
// and takes it from the block available list (BAL). If the channel's
// status bit in the address translation table (ATT) is 0 the new block
// becomes the channel's first block; if it is 1 the controller reads the
// channel's last block, sets its continuation bit C to 1 and writes the new
// block's number into its linkage pointer. Then it copies characters from
// the line buffer into the block, one per cycle, until the block's
// NBS-2 data words are full, the end of a message has been copied or the
// line buffer runs empty. It closes the block with C = 0 and a zero
// pointer, records the block as the channel's last block in the ATT, sets
// the status bit and appends the channel to the arrival order list (AOL).
// A channel is served one block at a time, so blocks of different channels
// interleave in arrival order.
//
// Overflow. If no block may be given, the event is counted (ev_overflow
// when the BAL is empty, ev_limit when blocks are free but the channel has
// reached its share) and, if the waiting buffer is vacant, up to one
// block's worth of the channel's characters is moved there (ev_wb_load) to
// make room in the line buffer. While the waiting buffer holds data it is
// served before any line buffer, as soon as its channel may take a block
// (ev_wb_serve).
//
// Dynamic partitioning. A channel may take a free block only if enough
// free blocks remain for every other channel that holds none to get one:
// n_free - 1 >= (idle channels other than this one). Any channel can thus
// hold from one block up to N_BLK - N_CH + 1 blocks, the range the source
// design gives; the exact form of the rule is this design's reading.
//
// Output process. When the AOL is not empty and the transmit queue has
// room for a whole frame, the controller takes the oldest AOL entry (a
// channel), reads the channel's first block from the ATT, and writes a
// frame into the transmit queue: the channel number, the number of data
// characters, then the characters. It then returns the block to the BAL.
// If C = 1 the linkage pointer becomes the channel's first block; if C = 0
// the block must be the channel's last block, the status bit is cleared,
// and a mismatch raises the sticky sys_error (the source design's "system
// error"). The length word carries the block's real data count instead of
// the fixed NBS of the source design, because the last block of a message
// is usually not full.
//
// QBM block layout (word offsets): 0 .. NBS-3 characters (lb_word_t),
// NBS-2 the continuation word {data count, C}, NBS-1 the linkage pointer
// (block number). The QBM is a single-port synchronous RAM; every access
// is one cycle. Event outputs are one-cycle pulses.
module buffer_control
  import smux_pkg::*;
#(
  parameter int unsigned N_CH     = N_CH_DEF,
  parameter int unsigned N_BLK    = N_BLK_DEF,
  parameter int unsigned NBS      = NBS_DEF,
  parameter int unsigned TX_DEPTH = 2 * NBS_DEF,
  localparam int unsigned CHW = (N_CH > 1) ? $clog2(N_CH) : 1,
  localparam int unsigned BW  = (N_BLK > 1) ? $clog2(N_BLK) : 1,
  localparam int unsigned NW  = $clog2(N_BLK + 1),
  localparam int unsigned ICW = $clog2(N_CH + 1),
  localparam int unsigned QW  = qbm_width(N_BLK, NBS),
  localparam int unsigned QAW = $clog2(N_BLK * NBS),
  localparam int unsigned TCW = $clog2(TX_DEPTH + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // line buffers
  input  logic [N_CH-1:0] lb_req,
  input  logic [N_CH-1:0] lb_empty,
  input  lb_word_t        lb_dout [N_CH],
  output logic [N_CH-1:0] lb_rd,
  // channel scanner
  output logic [N_CH-1:0] scan_req,
  input  logic            scan_valid,
  input  logic [CHW-1:0]  scan_ch,
  output logic            scan_advance,
  // waiting buffer
  input  logic            wb_vacant,
  input  logic            wb_full,
  input  lb_word_t        wb_dout,
  input  logic [CHW-1:0]  wb_tag,
  output logic            wb_wr,
  output lb_word_t        wb_din,
  output logic [CHW-1:0]  wb_wr_ch,
  output logic            wb_rd,
  // address translation table
  output logic [CHW-1:0]  att_rd_ch,
  input  logic [BW-1:0]   att_fba,
  input  logic [BW-1:0]   att_lba,
  input  logic            att_b,
  input  logic [NW-1:0]   att_nblk,
  input  logic [ICW-1:0]  att_n_idle,
  output logic            att_wr,
  output logic [CHW-1:0]  att_wr_ch,
  output logic [BW-1:0]   att_wr_fba,
  output logic [BW-1:0]   att_wr_lba,
  output logic            att_wr_b,
  output logic [NW-1:0]   att_wr_nblk,
  // block available list
  output logic            bal_alloc,
  input  logic [BW-1:0]   bal_free_blk,
  input  logic            bal_any_free,
  input  logic [NW-1:0]   bal_n_free,
  output logic            bal_rel,
  output logic [BW-1:0]   bal_rel_blk,
  // arrival order list
  output logic            aol_push,
  output logic [CHW-1:0]  aol_push_ch,
  output logic            aol_pop,
  input  logic [CHW-1:0]  aol_head,
  input  logic            aol_empty,
  // queueing buffer memory
  output logic            q_en,
  output logic            q_we,
  output logic [QAW-1:0]  q_addr,
  output logic [QW-1:0]   q_wdata,
  input  logic [QW-1:0]   q_rdata,
  // transmit queue
  output logic            tx_push,
  output tx_word_t        tx_din,
  input  logic [TCW-1:0]  tx_space,
  // events and status
  output logic            ev_block_in,
  output logic            ev_new_chain,
  output logic            ev_append,
  output logic            ev_overflow,
  output logic            ev_limit,
  output logic            ev_wb_load,
  output logic            ev_wb_serve,
  output logic            ev_block_out,
  output logic            ev_chain_end,
  output logic            sys_error
);

  localparam int unsigned DATA_WORDS = NBS - 2;
  localparam int unsigned CNTW       = $clog2(NBS - 1);   // holds 0 .. NBS-2

  typedef enum logic [3:0] {
    S_IDLE,
    S_IN_LOOK,      // read ATT of the channel, start linking if needed
    S_IN_SETC,      // previous last block: C := 1
    S_IN_LINK,      // previous last block: pointer := new block
    S_IN_DATA,      // copy characters into the new block
    S_IN_CLOSE,     // new block: C := 0 with the data count
    S_IN_NULL,      // new block: pointer := 0, update ATT, append to AOL
    S_WB_LOAD,      // overflow: line buffer -> waiting buffer
    S_OUT_START,    // read ATT, read continuation word of the first block
    S_OUT_CTL,      // send channel header, read linkage pointer
    S_OUT_LINK,     // send length header, read first character
    S_OUT_DATA,     // send characters
    S_OUT_FREE      // release block, advance ATT
  } state_e;

  state_e          state;
  logic [CHW-1:0]  cur_ch;
  logic            from_wb;       // input data comes from the waiting buffer
  logic            prefer_out;    // output process has the next turn
  logic [BW-1:0]   blk;           // block being written or sent
  logic            was_busy;
  logic [BW-1:0]   prev_lba;
  logic [CNTW-1:0] cnt;           // data words written / to send
  logic [CNTW-1:0] idx;           // data word being read in output
  logic            last_eom;
  logic            ctl_c;
  logic [BW-1:0]   link;

  localparam logic [QAW-1:0] OFF_C    = QAW'(NBS - 2);   // continuation word
  localparam logic [QAW-1:0] OFF_LINK = QAW'(NBS - 1);   // linkage pointer

  function automatic logic [QAW-1:0] waddr(input logic [BW-1:0] b, input logic [QAW-1:0] off);
    return QAW'(b) * QAW'(NBS) + off;
  endfunction

  // --- decisions made in S_IDLE -------------------------------------------
  logic           wb_pending, in_ready, out_cand, grant_ok;
  logic [CHW-1:0] in_ch;
  logic [ICW-1:0] idle_others;

  assign wb_pending = !wb_vacant;
  assign in_ch      = wb_pending ? wb_tag : scan_ch;
  assign out_cand   = !aol_empty && (tx_space >= TCW'(NBS));
  // ATT is read for in_ch in S_IDLE
  assign idle_others = att_n_idle - ICW'(att_nblk == '0);
  assign grant_ok    = bal_any_free && (NW'(bal_n_free) > NW'(idle_others));
  // input work that can make progress now: a waiting buffer that may take a
  // block, or a scanned channel (served, or moved to the waiting buffer).
  // A blocked waiting buffer must not keep the output process from running,
  // since only the output process frees blocks.
  assign in_ready    = wb_pending ? grant_ok : scan_valid;

  // the waiting buffer's channel is not scanned while it holds data
  always_comb begin
    scan_req = lb_req;
    if (wb_pending) scan_req[wb_tag] = 1'b0;
  end

  // --- source of input characters -------------------------------------
  lb_word_t src_word;
  logic     src_empty, take;
  assign src_word  = from_wb ? wb_dout : lb_dout[cur_ch];
  assign src_empty = from_wb ? wb_vacant : lb_empty[cur_ch];
  assign take = (state == S_IN_DATA || state == S_WB_LOAD) &&
                (cnt != CNTW'(DATA_WORDS)) && !src_empty && !last_eom &&
                !(state == S_WB_LOAD && wb_full);

  always_comb begin
    lb_rd = '0;
    if (take && !from_wb) lb_rd[cur_ch] = 1'b1;
  end
  assign wb_rd    = take && from_wb;
  assign wb_wr    = take && (state == S_WB_LOAD);
  assign wb_din   = src_word;
  assign wb_wr_ch = cur_ch;

  // --- combinational outputs per state ------------------------------------
  always_comb begin
    scan_advance = 1'b0;
    att_rd_ch    = cur_ch;
    att_wr       = 1'b0;
    att_wr_ch    = cur_ch;
    att_wr_fba   = att_fba;
    att_wr_lba   = att_lba;
    att_wr_b     = att_b;
    att_wr_nblk  = att_nblk;
    bal_alloc    = 1'b0;
    bal_rel      = 1'b0;
    bal_rel_blk  = blk;
    aol_push     = 1'b0;
    aol_push_ch  = cur_ch;
    aol_pop      = 1'b0;
    q_en         = 1'b0;
    q_we         = 1'b0;
    q_addr       = '0;
    q_wdata      = '0;
    tx_push      = 1'b0;
    tx_din       = '0;
    ev_block_in  = 1'b0;
    ev_new_chain = 1'b0;
    ev_append    = 1'b0;
    ev_overflow  = 1'b0;
    ev_limit     = 1'b0;
    ev_wb_load   = 1'b0;
    ev_wb_serve  = 1'b0;
    ev_block_out = 1'b0;
    ev_chain_end = 1'b0;

    unique case (state)
      S_IDLE: begin
        att_rd_ch = in_ch;
        if (out_cand && (prefer_out || !in_ready)) begin
          aol_pop = 1'b1;
        end else if (in_ready) begin
          if (!wb_pending) scan_advance = 1'b1;
          if (grant_ok) begin
            bal_alloc = 1'b1;
          end else if (!wb_pending) begin
            ev_overflow = !bal_any_free;
            ev_limit    = bal_any_free;
            ev_wb_load  = 1'b1;
          end
        end
      end
      S_IN_LOOK: begin
        if (att_b) begin
          q_en   = 1'b1;
          q_addr = waddr(att_lba, OFF_C);
        end
      end
      S_IN_SETC: begin
        q_en    = 1'b1;
        q_we    = 1'b1;
        q_addr  = waddr(prev_lba, OFF_C);
        q_wdata = q_rdata | QW'(1);
      end
      S_IN_LINK: begin
        q_en      = 1'b1;
        q_we      = 1'b1;
        q_addr    = waddr(prev_lba, OFF_LINK);
        q_wdata   = QW'(blk);
        ev_append = 1'b1;
      end
      S_IN_DATA: begin
        if (take) begin
          q_en    = 1'b1;
          q_we    = 1'b1;
          q_addr  = waddr(blk, '0) + QAW'(cnt);
          q_wdata = QW'(src_word);
        end
      end
      S_IN_CLOSE: begin
        q_en    = 1'b1;
        q_we    = 1'b1;
        q_addr  = waddr(blk, OFF_C);
        q_wdata = QW'({cnt, 1'b0});
      end
      S_IN_NULL: begin
        q_en         = 1'b1;
        q_we         = 1'b1;
        q_addr       = waddr(blk, OFF_LINK);
        q_wdata      = '0;
        att_wr       = 1'b1;
        att_wr_fba   = was_busy ? att_fba : blk;
        att_wr_lba   = blk;
        att_wr_b     = 1'b1;
        att_wr_nblk  = att_nblk + 1'b1;
        aol_push     = 1'b1;
        ev_block_in  = 1'b1;
        ev_new_chain = !was_busy;
        ev_wb_serve  = from_wb;
      end
      S_OUT_START: begin
        q_en   = 1'b1;
        q_addr = waddr(att_fba, OFF_C);
      end
      S_OUT_CTL: begin
        q_en    = 1'b1;
        q_addr  = waddr(blk, OFF_LINK);
        tx_push = 1'b1;
        tx_din  = '{kind: K_CHAN, w: '{eom: 1'b0, ch: CHAR_W'(cur_ch)}};
      end
      S_OUT_LINK: begin
        q_en    = 1'b1;
        q_addr  = waddr(blk, '0);
        tx_push = 1'b1;
        tx_din  = '{kind: K_LEN, w: '{eom: 1'b0, ch: CHAR_W'(cnt)}};
      end
      S_OUT_DATA: begin
        q_en    = 1'b1;
        q_addr  = waddr(blk, '0) + QAW'(idx) + 1'b1;
        tx_push = 1'b1;
        tx_din  = '{kind: K_DATA, w: lb_word_t'(q_rdata[LB_WORD_W-1:0])};
      end
      S_OUT_FREE: begin
        bal_rel      = 1'b1;
        att_wr       = 1'b1;
        att_wr_nblk  = att_nblk - 1'b1;
        ev_block_out = 1'b1;
        if (ctl_c) begin
          att_wr_fba = link;
        end else begin
          att_wr_b     = 1'b0;
          ev_chain_end = 1'b1;
        end
      end
      default: ;
    endcase
  end

  // --- state register -----------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cur_ch     <= '0;
      from_wb    <= 1'b0;
      prefer_out <= 1'b0;
      blk        <= '0;
      was_busy   <= 1'b0;
      prev_lba   <= '0;
      cnt        <= '0;
      idx        <= '0;
      last_eom   <= 1'b0;
      ctl_c      <= 1'b0;
      link       <= '0;
      sys_error  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          cnt      <= '0;
          last_eom <= 1'b0;
          if (out_cand && (prefer_out || !in_ready)) begin
            cur_ch     <= aol_head;
            prefer_out <= 1'b0;
            state      <= S_OUT_START;
          end else if (in_ready) begin
            cur_ch  <= in_ch;
            from_wb <= wb_pending;
            if (grant_ok) begin
              blk        <= bal_free_blk;
              prefer_out <= 1'b1;
              state      <= S_IN_LOOK;
            end else if (!wb_pending && wb_vacant) begin
              from_wb <= 1'b0;
              state   <= S_WB_LOAD;
            end
          end
        end
        S_IN_LOOK: begin
          was_busy <= att_b;
          prev_lba <= att_lba;
          state    <= att_b ? S_IN_SETC : S_IN_DATA;
        end
        S_IN_SETC: state <= S_IN_LINK;
        S_IN_LINK: state <= S_IN_DATA;
        S_IN_DATA: begin
          if (take) begin
            cnt      <= cnt + 1'b1;
            last_eom <= src_word.eom;
          end else begin
            state <= S_IN_CLOSE;
          end
        end
        S_IN_CLOSE: state <= S_IN_NULL;
        S_IN_NULL:  state <= S_IDLE;
        S_WB_LOAD: begin
          if (take) begin
            cnt      <= cnt + 1'b1;
            last_eom <= src_word.eom;
          end else begin
            state <= S_IDLE;
          end
        end
        S_OUT_START: begin
          blk   <= att_fba;
          state <= S_OUT_CTL;
          if (!att_b) begin
            sys_error <= 1'b1;
            state     <= S_IDLE;
          end
        end
        S_OUT_CTL: begin
          cnt   <= q_rdata[CNTW:1];
          ctl_c <= q_rdata[0];
          state <= S_OUT_LINK;
        end
        S_OUT_LINK: begin
          link  <= q_rdata[BW-1:0];
          idx   <= '0;
          state <= S_OUT_DATA;
        end
        S_OUT_DATA: begin
          idx <= idx + 1'b1;
          if (idx + 1'b1 == cnt) state <= S_OUT_FREE;
        end
        S_OUT_FREE: begin
          if (!ctl_c && (blk != att_lba)) sys_error <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // --- rules --------------------------------------------------------------
  // a block is never closed empty
  a_block_not_empty: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IN_CLOSE) |-> (cnt != '0));
  // a frame is only started when it fits in the transmit queue
  a_frame_fits: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_OUT_CTL) |-> (tx_space >= TCW'(NBS)));

  initial begin
    assert (NBS >= 3 && DATA_WORDS < (1 << CHAR_W))
      else $error("buffer_control: NBS must lie in 3 .. 2**CHAR_W+1");
    assert (N_BLK >= N_CH)
      else $error("buffer_control: need at least one block per channel");
    assert (TX_DEPTH >= NBS)
      else $error("buffer_control: transmit queue must hold one frame");
  end

endmodule
